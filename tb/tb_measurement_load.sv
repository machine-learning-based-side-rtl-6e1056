// tb_measurement_load: self-checking test of the measurement load at a reduced
// size (40 oscillators, 4 of them forming the EMA subset).
//
// For every combination of the two enables the test counts toggles of every
// oscillator over a fixed window and compares the set of running oscillators
// with the expected one: none when both enables are low, exactly the lowest
// N_RO_EMA with only the EMA enable, all N_RO_PA whenever the PA enable is
// high. Idle oscillators must read 1, running ones must toggle once per loop
// delay.
module tb_measurement_load;
  localparam int unsigned N_PA  = 40;
  localparam int unsigned N_EMA = 4;
  localparam int unsigned HALF  = 500;   // ps
  localparam int unsigned WIN_PS = 20_000;

  logic            ema_en, pa_en;
  logic [N_PA-1:0] osc;
  int              checks = 0, failures = 0;

  measurement_load #(.N_RO_PA(N_PA), .N_RO_EMA(N_EMA), .HALF_PERIOD_PS(HALF)) dut (
    .ema_en(ema_en), .pa_en(pa_en), .osc(osc)
  );

  int unsigned     tog [N_PA];
  logic [N_PA-1:0] prev;
  always @(osc) begin
    for (int i = 0; i < N_PA; i++) if (osc[i] != prev[i]) tog[i]++;
    prev = osc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2us;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ema_en = 1'b0;
    pa_en  = 1'b0;
    #5ns;
    for (int mode = 0; mode < 4; mode++) begin
      ema_en = mode[0];
      pa_en  = mode[1];
      #(HALF * 1ps + 1ps);
      prev = osc;
      foreach (tog[i]) tog[i] = 0;
      #(WIN_PS * 1ps);
      for (int i = 0; i < N_PA; i++) begin
        automatic bit expect_on = pa_en || (ema_en && i < N_EMA);
        if (expect_on)
          check(tog[i] >= WIN_PS / HALF - 1 && tog[i] <= WIN_PS / HALF + 1,
                $sformatf("mode %0d: RO %0d toggled %0d times, expected %0d", mode, i, tog[i], WIN_PS / HALF));
        else
          check(tog[i] == 0 && osc[i] == 1'b1,
                $sformatf("mode %0d: RO %0d should be idle (toggles %0d)", mode, i, tog[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
