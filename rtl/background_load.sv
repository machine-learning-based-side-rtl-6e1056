// background_load: training-only load generator that imitates the unknown
// activity of the rest of the system.
//
// N_BLOCKS blocks (15 in the published setup) of N_RO_PER_BLOCK ring
// oscillators (1000 each), every block switched by its own enable bit, so the
// training software can step the background activity from 0 to 15 blocks.
// It is left out of the deployed detection build. Block b drives
// osc[b*N_RO_PER_BLOCK +: N_RO_PER_BLOCK]; disabled oscillators hold 1.
//
// Interface: blk_en[N_BLOCKS-1:0] level enables, osc for observation only.
// No clock.
module background_load #(
  parameter int unsigned N_BLOCKS       = sca_pkg::N_BG_BLOCKS_DEFAULT,
  parameter int unsigned N_RO_PER_BLOCK = sca_pkg::N_RO_PER_BG_DEFAULT,
  parameter int unsigned HALF_PERIOD_PS = 500
) (
  input  logic [N_BLOCKS-1:0]                blk_en,
  output logic [N_BLOCKS*N_RO_PER_BLOCK-1:0] osc
);

  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_block
    ro_array #(.N_RO(N_RO_PER_BLOCK), .HALF_PERIOD_PS(HALF_PERIOD_PS)) u_block (
      .en  (blk_en[b]),
      .osc (osc[b*N_RO_PER_BLOCK +: N_RO_PER_BLOCK])
    );
  end

endmodule
