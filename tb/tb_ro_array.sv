// tb_ro_array: self-checking test of the ring-oscillator bank.
//
// Drives the shared enable low, high and low again and counts the toggles of
// every oscillator output. Expected behaviour, worked out from the oscillator
// definition NAND(en, own output) with a loop delay of HALF_PERIOD_PS:
//   en = 0: every output holds 1 and never toggles;
//   en = 1: every output toggles once per HALF_PERIOD_PS, so a window of
//           W ps holds W / HALF_PERIOD_PS toggles (+-1 for the window edges);
//   after en falls every output returns to 1 within one loop delay.
module tb_ro_array;
  localparam int unsigned N    = 8;
  localparam int unsigned HALF = 500;   // ps

  logic         en;
  logic [N-1:0] osc;
  int           checks = 0, failures = 0;

  ro_array #(.N_RO(N), .HALF_PERIOD_PS(HALF)) dut (.en(en), .osc(osc));

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

  task automatic clear_counts();
    prev = osc;
    foreach (tog[i]) tog[i] = 0;
  endtask

  // Watchdog.
  initial begin
    #1us;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned WIN_PS = 100_000;   // 100 ns window

  initial begin
    en = 1'b0;
    #5ns;
    // Disabled: outputs settle at 1 and stay there.
    clear_counts();
    #20ns;
    check(osc == '1, "disabled outputs are not all 1");
    for (int i = 0; i < N; i++) check(tog[i] == 0, $sformatf("RO %0d toggled while disabled", i));

    // Enabled: one toggle per half period.
    en = 1'b1;
    #1ps;
    clear_counts();
    #(WIN_PS * 1ps);
    for (int i = 0; i < N; i++)
      check(tog[i] >= WIN_PS / HALF - 1 && tog[i] <= WIN_PS / HALF + 1,
            $sformatf("RO %0d: %0d toggles in %0d ps, expected %0d", i, tog[i], WIN_PS, WIN_PS / HALF));

    // Disabled again: back to 1 within one loop delay, then quiet.
    en = 1'b0;
    #(HALF * 1ps + 1ps);
    check(osc == '1, "outputs did not return to 1 after disable");
    clear_counts();
    #20ns;
    for (int i = 0; i < N; i++) check(tog[i] == 0, $sformatf("RO %0d toggled after disable", i));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
