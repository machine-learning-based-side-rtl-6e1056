// pwm_fan_control: training-only PWM generator for the chip's cooling fan.
//
// During training data collection the fan speed is one of the scenario
// variables (0 % to 100 % in 20 % steps), set by software through a control
// register; the PWM leaves the chip on an I/O pin to an off-chip fan driver.
// That much follows the published design. Everything about the waveform is
// this design's choice: a 25 kHz period (the usual 4-wire fan PWM frequency)
// divided into 100 steps of 1 %, high while the step count is below the duty,
// so 0 gives a constant low and 100 (or more) a constant high.
//
// How it works: a prescaler divides clk by DIV = CLK_HZ / (PWM_HZ * 100) and
// advances a step counter 0..99. The duty input is sampled at step 0 of every
// period, so a change takes effect at the next period boundary and never
// produces a runt pulse.
//
// Timing: one PWM period is exactly 100 * DIV clock cycles (4000 at the
// defaults); the output is registered. Reset (rst_n low, synchronous) holds
// the output low (fan off) and restarts the period.
module pwm_fan_control #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned PWM_HZ = 25_000
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [sca_pkg::FAN_DUTY_W-1:0]   duty_pct,
  output logic                             pwm
);
  import sca_pkg::*;

  localparam int unsigned STEPS = FAN_DUTY_MAX;
  localparam int unsigned DIV   = (CLK_HZ / (PWM_HZ * STEPS)) > 0 ? CLK_HZ / (PWM_HZ * STEPS) : 1;
  localparam int unsigned DIV_W = DIV > 1 ? $clog2(DIV) : 1;

  logic [DIV_W-1:0]      pre_q;
  logic [FAN_DUTY_W-1:0] step_q;
  logic [FAN_DUTY_W-1:0] duty_q;
  logic                  tick;

  assign tick = (pre_q == DIV_W'(DIV - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pre_q  <= '0;
      step_q <= '0;
      duty_q <= '0;
      pwm    <= 1'b0;
    end else begin
      pre_q <= tick ? '0 : pre_q + 1'b1;
      if (tick) begin
        step_q <= (step_q == FAN_DUTY_W'(STEPS - 1)) ? '0 : step_q + 1'b1;
      end
      // Take a new duty value only at the first clock of a period.
      if (step_q == '0 && pre_q == '0) begin
        duty_q <= (duty_pct > FAN_DUTY_W'(STEPS)) ? FAN_DUTY_W'(STEPS) : duty_pct;
        pwm    <= (duty_pct != '0);
      end else begin
        pwm    <= (step_q < duty_q);
      end
    end
  end

endmodule
