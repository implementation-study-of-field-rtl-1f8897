// motor_pwm
//
// Pulse-width modulation for the two DC motors, driven through the two
// input pins of each channel of an L298N dual H-bridge (pwm1/pwm2 for
// motor 1, pwm3/pwm4 for motor 2).  Both motors get the same speed.
//
// A prescaler divides the clock by CLK_HZ / (PWM_HZ * 100), so that a step
// counter runs 0..99 once per PWM period; the output is high while the step
// is below the duty cycle in percent.  A duty of 0 keeps the output low and
// a duty of 100 keeps it high.  The duty is sampled once per period, at
// step 0, so a change never cuts a pulse short.
//
// Each motor turns forward: its first H-bridge input carries the PWM
// waveform and its second input is held low.  With the duty at 0 both
// inputs are low, which lets the motor coast to a stop.  The second inputs
// are therefore constant in this design; they stay on the pins so that a
// reverse drive can be added without rewiring.
//
// Interface and timing:
//   duty_i        - duty cycle in percent, 0..100 (values above 100 act as
//                   100)
//   pwm1_o/pwm2_o - motor 1 H-bridge inputs
//   pwm3_o/pwm4_o - motor 2 H-bridge inputs
//   period_start_o- one-cycle pulse at the start of each PWM period
// All outputs are registered.
//
// The four pwm lines and their split over the two motors follow the
// design; the PWM frequency, the percent resolution and the
// forward/coast pin pattern are this implementation's choices.
module motor_pwm
  import distance_safety_pkg::*;
#(
  parameter int unsigned CLK_HZ = DEF_CLK_HZ,
  parameter int unsigned PWM_HZ = 1000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  duty_pct_t duty_i,
  output logic      pwm1_o,
  output logic      pwm2_o,
  output logic      pwm3_o,
  output logic      pwm4_o,
  output logic      period_start_o
);

  localparam int unsigned STEPS    = 100;
  localparam int unsigned PRESCALE = CLK_HZ / (PWM_HZ * STEPS);
  localparam int unsigned PRE_W    = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;

  logic [PRE_W-1:0] pre_cnt;
  logic [6:0]       step;
  duty_pct_t        duty_q;
  logic             tick;
  logic             pwm;

  assign tick = (pre_cnt == PRE_W'(PRESCALE - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pre_cnt        <= '0;
      step           <= '0;
      duty_q         <= '0;
      pwm            <= 1'b0;
      period_start_o <= 1'b0;
    end else begin
      period_start_o <= 1'b0;
      if (tick) begin
        pre_cnt <= '0;
        step    <= (step == 7'(STEPS - 1)) ? '0 : step + 1'b1;
      end else begin
        pre_cnt <= pre_cnt + 1'b1;
      end
      // Sample the duty at the first clock of step 0.
      if (step == '0 && pre_cnt == '0) begin
        duty_q         <= duty_i;
        period_start_o <= 1'b1;
        pwm            <= (duty_i != '0);
      end else begin
        pwm <= ({1'b0, step} < {1'b0, duty_q});
      end
    end
  end

  // A duty of 0 never produces a pulse once the period has started.
  a_zero_duty_low: assert property (@(posedge clk) disable iff (!rst_n)
    (duty_q == '0 && !(step == '0 && pre_cnt == '0)) |=> !pwm);

  always_comb begin
    pwm1_o = pwm;
    pwm2_o = 1'b0;
    pwm3_o = pwm;
    pwm4_o = 1'b0;
  end

endmodule
