// tb_pwm_fan_control: self-checking test of the fan PWM generator.
//
// Runs the generator with a small clock divider (DIV = 4, so one PWM period is
// 400 clocks) and, for the fan speeds 0..100 % in 20 % steps plus a few other
// values, measures in steady state: high time per period (duty * DIV clocks,
// values above 100 act as 100), the period (distance between rising edges,
// 100 * DIV clocks) and the width of every high pulse. It also checks that the
// output is low during reset and that a duty change mid-period leaves the
// running period untouched (no runt pulse).
module tb_pwm_fan_control;
  localparam int unsigned CLK_HZ = 1_000_000;
  localparam int unsigned PWM_HZ = 2_500;
  localparam int unsigned DIV    = CLK_HZ / (PWM_HZ * 100);
  localparam int unsigned PERIOD = 100 * DIV;

  logic       clk = 1'b0, rst_n;
  logic [6:0] duty;
  logic       pwm;
  int         checks = 0, failures = 0;

  pwm_fan_control #(.CLK_HZ(CLK_HZ), .PWM_HZ(PWM_HZ)) dut (
    .clk(clk), .rst_n(rst_n), .duty_pct(duty), .pwm(pwm)
  );

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Measure over n periods starting now: total high clocks, rising edges,
  // first rise-to-rise distance and high-pulse widths (all must be equal).
  task automatic measure(input int unsigned d);
    int unsigned eff, high, rises, last_rise, width, bad_width, bad_period, t;
    logic prev;
    eff = (d > 100) ? 100 : d;
    high = 0; rises = 0; last_rise = 0; width = 0; bad_width = 0; bad_period = 0;
    prev = pwm;
    for (t = 0; t < 3 * PERIOD; t++) begin
      @(posedge clk);
      if (pwm) high++;
      if (pwm && !prev) begin
        if (rises > 0 && t - last_rise != PERIOD) bad_period++;
        rises++;
        last_rise = t;
        width = 0;
      end
      if (pwm) width++;
      if (!pwm && prev && rises > 0 && width != eff * DIV) bad_width++;
      prev = pwm;
    end
    check(high == 3 * eff * DIV,
          $sformatf("duty %0d: %0d high clocks in 3 periods, expected %0d", d, high, 3 * eff * DIV));
    if (eff > 0 && eff < 100) begin
      check(rises == 3, $sformatf("duty %0d: %0d rising edges in 3 periods", d, rises));
      check(bad_period == 0, $sformatf("duty %0d: period differs from %0d clocks", d, PERIOD));
      check(bad_width == 0, $sformatf("duty %0d: high pulse not %0d clocks", d, eff * DIV));
    end else begin
      check(rises == 0, $sformatf("duty %0d: output not constant", d));
    end
  endtask

  int unsigned duties [10] = '{0, 20, 40, 60, 80, 100, 37, 1, 99, 127};

  initial begin
    int unsigned hi;
    rst_n = 1'b0;
    duty  = 7'd50;
    repeat (20) @(posedge clk);
    check(pwm == 1'b0, "output not low in reset");
    rst_n <= 1'b1;

    foreach (duties[k]) begin
      duty <= 7'(duties[k]);
      repeat (2 * PERIOD) @(posedge clk);   // settle: new value at next period
      measure(duties[k]);
    end

    // A mid-period change must not alter the running period: start at 50 %,
    // then change to 10 % a quarter into a period; that period still carries
    // 50 * DIV high clocks.
    duty <= 7'd50;
    repeat (2 * PERIOD) @(posedge clk);
    while (!(pwm == 1'b1 && dut.step_q == 0 && dut.pre_q == 1)) @(posedge clk);
    // We are one clock into a period, pwm high.
    repeat (PERIOD / 4 - 1) @(posedge clk);
    duty <= 7'd10;
    hi = PERIOD / 4;
    repeat (PERIOD - PERIOD / 4) begin
      @(posedge clk);
      if (pwm) hi++;
    end
    check(hi == 50 * DIV, $sformatf("mid-period change altered the period: %0d high clocks", hi));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
