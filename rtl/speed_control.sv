// speed_control
//
// Chooses the motor speed from the measured range.  The range is sorted
// into four bands by three thresholds, and each band has its own duty
// cycle: far away the motors run at FAST_DUTY, closer in they slow to
// MEDIUM_DUTY and then SLOW_DUTY, and below STOP_CM they stop, so the
// vehicle halts before it reaches the obstacle.  The run switch (sw) must
// be on for the motors to turn; with it off the duty is 0 whatever the
// range.
//
//   range < STOP_CM            -> ZONE_STOP,   duty 0
//   STOP_CM  <= range < SLOW_CM   -> ZONE_SLOW,   SLOW_DUTY
//   SLOW_CM  <= range < MEDIUM_CM -> ZONE_MEDIUM, MEDIUM_DUTY
//   range >= MEDIUM_CM         -> ZONE_FAST,   FAST_DUTY
//
// Interface and timing: purely combinational; dist_cm_i and run_i in,
// duty_o (percent) and zone_o out in the same cycle.  The range input is
// registered upstream and changes once per measurement.
//
// Lower speed at shorter range and a stop range follow the design, as does
// stopping at 9 cm.  The band edges, the duty values and the use of the
// switch as a run enable are this implementation's choices.
module speed_control
  import distance_safety_pkg::*;
#(
  parameter int unsigned STOP_CM     = 10,
  parameter int unsigned SLOW_CM     = 20,
  parameter int unsigned MEDIUM_CM   = 40,
  parameter int unsigned SLOW_DUTY   = 40,
  parameter int unsigned MEDIUM_DUTY = 70,
  parameter int unsigned FAST_DUTY   = 100
) (
  input  dist_cm_t    dist_cm_i,
  input  logic        run_i,
  output duty_pct_t   duty_o,
  output speed_zone_t zone_o
);

  always_comb begin
    if (dist_cm_i < dist_cm_t'(STOP_CM))        zone_o = ZONE_STOP;
    else if (dist_cm_i < dist_cm_t'(SLOW_CM))   zone_o = ZONE_SLOW;
    else if (dist_cm_i < dist_cm_t'(MEDIUM_CM)) zone_o = ZONE_MEDIUM;
    else                                        zone_o = ZONE_FAST;

    unique case (zone_o)
      ZONE_STOP:   duty_o = '0;
      ZONE_SLOW:   duty_o = duty_pct_t'(SLOW_DUTY);
      ZONE_MEDIUM: duty_o = duty_pct_t'(MEDIUM_DUTY);
      default:     duty_o = duty_pct_t'(FAST_DUTY);
    endcase
    if (!run_i) duty_o = '0;
  end

endmodule
