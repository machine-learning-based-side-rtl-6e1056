// measurement_load: the ring-oscillator load that the detection software
// switches on to provoke a supply-voltage drop and a temperature rise.
//
// The load holds N_RO_PA ring oscillators (25000 in the published
// configuration) for power-analysis (PA) tamper detection. Electromagnetic-
// analysis (EMA) detection needs a smaller load (2500 oscillators); as in the
// published design it is not a separate circuit but a subset of the PA load,
// so detecting both attacks costs no extra area. Here the subset is the lowest
// N_RO_EMA oscillators (the choice of which ones is this design's own):
//   ema_en = 1 -> osc[N_RO_EMA-1:0] oscillate
//   pa_en  = 1 -> all N_RO_PA oscillators oscillate (subset included)
// Disabled oscillators hold 1.
//
// Interface: level-sensitive enables from the control registers, osc outputs
// for observation only. No clock; the oscillators start and stop within one
// loop delay of the enable changing.
module measurement_load #(
  parameter int unsigned N_RO_PA        = sca_pkg::N_RO_PA_DEFAULT,
  parameter int unsigned N_RO_EMA       = sca_pkg::N_RO_EMA_DEFAULT,
  parameter int unsigned HALF_PERIOD_PS = 500
) (
  input  logic               ema_en,
  input  logic               pa_en,
  output logic [N_RO_PA-1:0] osc
);

  initial begin
    assert (N_RO_EMA > 0 && N_RO_EMA < N_RO_PA)
      else $error("measurement_load: N_RO_EMA must be in 1..N_RO_PA-1");
  end

  logic ema_part_en;
  assign ema_part_en = ema_en | pa_en;

  // Shared part: used by both EMA and PA detection.
  ro_array #(.N_RO(N_RO_EMA), .HALF_PERIOD_PS(HALF_PERIOD_PS)) u_ema_part (
    .en  (ema_part_en),
    .osc (osc[N_RO_EMA-1:0])
  );

  // Remaining part: only used for PA detection.
  ro_array #(.N_RO(N_RO_PA - N_RO_EMA), .HALF_PERIOD_PS(HALF_PERIOD_PS)) u_pa_part (
    .en  (pa_en),
    .osc (osc[N_RO_PA-1:N_RO_EMA])
  );

endmodule
