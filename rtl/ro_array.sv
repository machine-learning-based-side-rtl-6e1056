// ro_array: a bank of ring oscillators that share one enable.
//
// Each ring oscillator is a single lookup table computing NAND(en, own output)
// and feeding its output straight back to its input. With en = 0 the output
// sits at 1; with en = 1 the loop inverts itself and oscillates at a rate set
// by the LUT and routing delay. The bank does no computation: its only purpose
// is to draw current and heat the die so that the on-chip voltage and
// temperature sensors see a load response. Building each oscillator from one
// LUT and protecting it from optimisation with DONT_TOUCH and
// ALLOW_COMBINATORIAL_LOOPS follows the published design; the NAND form of
// the enable is this design's choice.
//
// The combinational loop is intended and is the reason the module exists;
// tools report it as a loop and that report stands.
//
// The loop delay HALF_PERIOD_PS exists only for simulation, so that an enabled
// oscillator toggles every HALF_PERIOD_PS instead of never settling; synthesis
// ignores it and the real period comes from the silicon. All N_RO oscillators
// are written as one vector assignment, which a synthesis tool splits into
// N_RO independent single-LUT loops and which keeps simulation cost flat.
//
// Interface: en (asynchronous, level) -> osc[N_RO-1:0]. No clock.
module ro_array #(
  parameter int unsigned N_RO           = 1000,
  parameter int unsigned HALF_PERIOD_PS = 500
) (
  input  logic            en,
  output logic [N_RO-1:0] osc
);

  (* DONT_TOUCH = "yes", ALLOW_COMBINATORIAL_LOOPS = "yes" *)
  logic [N_RO-1:0] ring;

  assign #(HALF_PERIOD_PS * 1ps) ring = ~(ring & {N_RO{en}});
  assign osc = ring;

endmodule
