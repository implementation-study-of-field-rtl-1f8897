// range_to_digits
//
// Splits a range in centimetres into the tens and units digits shown on
// the two 7-segment displays.  Two digits can show 0 to 99 cm, so any
// range above 99 cm (including the sensor's out-of-range value) is shown
// as 99.  The split uses constant division by ten, which synthesis turns
// into a small constant-divider network.
//
// Interface and timing: purely combinational, dist_cm_i in, tens_o and
// units_o out in the same cycle.
//
// Showing the range in cm on two digits follows the design; the clamp to
// 99 is this implementation's choice.
module range_to_digits
  import distance_safety_pkg::*;
(
  input  dist_cm_t dist_cm_i,
  output bcd_t     tens_o,
  output bcd_t     units_o
);

  logic [6:0] shown;

  always_comb begin
    shown   = (dist_cm_i > dist_cm_t'(99)) ? 7'd99 : dist_cm_i[6:0];
    tens_o  = bcd_t'(shown / 7'd10);
    units_o = bcd_t'(shown % 7'd10);
  end

endmodule
