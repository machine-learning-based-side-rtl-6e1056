// tb_background_load: self-checking test of the background load with the
// published 15 blocks, each cut down to 3 oscillators.
//
// Applies all-off, all-on, every one-hot mask and random masks. For each mask
// it counts toggles per oscillator over a window: oscillators of an enabled
// block must toggle once per loop delay, those of a disabled block must hold 1.
// It also checks the number of running oscillators against
// popcount(mask) * oscillators per block.
module tb_background_load;
  localparam int unsigned NB   = 15;
  localparam int unsigned NR   = 3;
  localparam int unsigned N    = NB * NR;
  localparam int unsigned HALF = 500;   // ps
  localparam int unsigned WIN_PS = 10_000;

  logic [NB-1:0] blk_en;
  logic [N-1:0]  osc;
  int            checks = 0, failures = 0;

  background_load #(.N_BLOCKS(NB), .N_RO_PER_BLOCK(NR), .HALF_PERIOD_PS(HALF)) dut (
    .blk_en(blk_en), .osc(osc)
  );

  int unsigned  tog [N];
  logic [N-1:0] prev;
  always @(osc) begin
    for (int i = 0; i < N; i++) if (osc[i] != prev[i]) tog[i]++;
    prev = osc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_mask(input logic [NB-1:0] m);
    int running;
    blk_en = m;
    #(HALF * 1ps + 1ps);
    prev = osc;
    foreach (tog[i]) tog[i] = 0;
    #(WIN_PS * 1ps);
    running = 0;
    for (int i = 0; i < N; i++) begin
      if (m[i / NR]) begin
        running++;
        check(tog[i] >= WIN_PS / HALF - 1 && tog[i] <= WIN_PS / HALF + 1,
              $sformatf("mask %h: RO %0d of enabled block toggled %0d times", m, i, tog[i]));
      end else begin
        check(tog[i] == 0 && osc[i] == 1'b1,
              $sformatf("mask %h: RO %0d of disabled block is active", m, i));
      end
    end
    check(running == $countones(m) * NR, "running oscillator count");
  endtask

  initial begin
    #5us;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_en = '0;
    #5ns;
    run_mask('0);
    run_mask('1);
    for (int b = 0; b < NB; b++) run_mask(NB'(1) << b);
    repeat (10) run_mask(NB'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
