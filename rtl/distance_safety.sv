// distance_safety
//
// Ultrasonic collision avoidance controller for a small two-motor
// vehicle.  The controller repeatedly pings an HC-SR04 ultrasonic sensor,
// converts the echo time to the range of the nearest obstacle in
// centimetres, shows that range on two common-anode 7-segment digits, and
// drives both DC motors (through an L298N H-bridge) at a speed chosen from
// the range: the closer the obstacle, the slower the motors, until they
// stop in the stop range before the vehicle reaches the obstacle.
//
//   pulse_pin --> ultrasonic_ranger --dist--+--> range_to_digits --> 2 x seg7_decoder --> topseg*
//   Trigger_pin <--'                       |
//                                           +--> speed_control --duty--> motor_pwm --> pwm1..pwm4
//   sw (run switch) ------------------------------'
//
// The port list is the design's own 22-pin interface: the clock, the
// sensor's trigger and echo, the run switch, seven segment lines for each
// digit and four motor lines.  topsegA..topsegG drive the units digit and
// topsegA1..topsegG1 the tens digit; a segment is lit when its line is 0.
// pwm1/pwm2 go to motor 1 and pwm3/pwm4 to motor 2.
//
// There is no reset pin.  A four-bit power-on counter, which starts at
// zero on configuration, holds the logic in reset for the first 15 clocks.
// Until the first measurement the range reads 0, so the display shows
// "00" and the motors stay stopped.
//
// Timing: a measurement every CYCLE_MS (60 ms by default); the display and
// the motor duty follow one clock after the echo pulse ends, and the motor
// outputs take the new duty at the start of their next PWM period
// (1 ms by default).
//
// The blocks, the port names and their roles follow the design.  The
// clock rate, the sensor timing, the speed bands and the PWM frequency
// are parameters whose defaults are this implementation's choices.
module distance_safety
  import distance_safety_pkg::*;
#(
  parameter int unsigned CLK_HZ      = DEF_CLK_HZ,
  parameter int unsigned CYCLE_MS    = 60,
  parameter int unsigned PWM_HZ      = 1000,
  parameter int unsigned STOP_CM     = 10,
  parameter int unsigned SLOW_CM     = 20,
  parameter int unsigned MEDIUM_CM   = 40,
  parameter int unsigned SLOW_DUTY   = 40,
  parameter int unsigned MEDIUM_DUTY = 70,
  parameter int unsigned FAST_DUTY   = 100
) (
  input  logic pulse_pin,
  output logic Trigger_pin,
  input  logic clk,
  output logic topsegA,
  output logic topsegB,
  output logic topsegC,
  output logic topsegD,
  output logic topsegE,
  output logic topsegF,
  output logic topsegG,
  output logic topsegA1,
  output logic topsegB1,
  output logic topsegC1,
  output logic topsegD1,
  output logic topsegE1,
  output logic topsegF1,
  output logic topsegG1,
  input  logic sw,
  output logic pwm1,
  output logic pwm2,
  output logic pwm3,
  output logic pwm4
);

  // Power-on reset: the counter's initial value is its configured state.
  logic [3:0] por_cnt = 4'd0;
  logic       rst_n;

  always_ff @(posedge clk) begin
    if (por_cnt != 4'hF) por_cnt <= por_cnt + 1'b1;
  end
  assign rst_n = (por_cnt == 4'hF);

  dist_cm_t    dist_cm;
  logic        dist_valid;
  logic        dist_timeout;
  bcd_t        tens, units;
  seg7_t       seg_units_n, seg_tens_n;
  duty_pct_t   duty;
  speed_zone_t zone;
  logic        period_start;
  logic        run_sync_q, run;

  ultrasonic_ranger #(
    .CLK_HZ   (CLK_HZ),
    .CYCLE_MS (CYCLE_MS)
  ) u_ranger (
    .clk       (clk),
    .rst_n     (rst_n),
    .echo_i    (pulse_pin),
    .trig_o    (Trigger_pin),
    .dist_cm_o (dist_cm),
    .valid_o   (dist_valid),
    .timeout_o (dist_timeout)
  );

  range_to_digits u_digits (
    .dist_cm_i (dist_cm),
    .tens_o    (tens),
    .units_o   (units)
  );

  seg7_decoder u_seg_units (.digit_i(units), .seg_n_o(seg_units_n));
  seg7_decoder u_seg_tens  (.digit_i(tens),  .seg_n_o(seg_tens_n));

  assign {topsegG,  topsegF,  topsegE,  topsegD,  topsegC,  topsegB,  topsegA } = seg_units_n;
  assign {topsegG1, topsegF1, topsegE1, topsegD1, topsegC1, topsegB1, topsegA1} = seg_tens_n;

  // The run switch is asynchronous to the clock: synchronise it.
  always_ff @(posedge clk) begin
    if (!rst_n) {run, run_sync_q} <= 2'b00;
    else        {run, run_sync_q} <= {run_sync_q, sw};
  end

  speed_control #(
    .STOP_CM     (STOP_CM),
    .SLOW_CM     (SLOW_CM),
    .MEDIUM_CM   (MEDIUM_CM),
    .SLOW_DUTY   (SLOW_DUTY),
    .MEDIUM_DUTY (MEDIUM_DUTY),
    .FAST_DUTY   (FAST_DUTY)
  ) u_speed (
    .dist_cm_i (dist_cm),
    .run_i     (run),
    .duty_o    (duty),
    .zone_o    (zone)
  );

  motor_pwm #(
    .CLK_HZ (CLK_HZ),
    .PWM_HZ (PWM_HZ)
  ) u_pwm (
    .clk            (clk),
    .rst_n          (rst_n),
    .duty_i         (duty),
    .pwm1_o         (pwm1),
    .pwm2_o         (pwm2),
    .pwm3_o         (pwm3),
    .pwm4_o         (pwm4),
    .period_start_o (period_start)
  );

  // dist_valid, dist_timeout, zone and period_start are status signals for
  // a logic analyser probe; nothing on the board reads them.

endmodule
