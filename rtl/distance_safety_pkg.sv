// distance_safety_pkg
//
// Types and default constants shared by the blocks of the ultrasonic
// collision avoidance controller (distance_safety and its children).
//
//  * dist_cm_t   - a measured range in whole centimetres.  Nine bits hold
//                  the 400 cm limit of an HC-SR04 class sensor.
//  * bcd_t       - one decimal digit for a display.
//  * seg7_t      - the seven segment lines of one digit, bit 0 = segment A
//                  through bit 6 = segment G.  The displays are common
//                  anode, so a segment is lit when its line is 0.  With
//                  this order a lit "9" reads 10h and a lit "0" reads 40h.
//  * duty_pct_t  - a motor duty cycle in percent, 0 to 100.
//  * speed_zone_t- the range band that selects the motor speed.
//
// The 50 MHz board clock is this design's assumption for both the FPGA
// and the CPLD boards; every block takes the clock rate as a parameter.
package distance_safety_pkg;

  localparam int unsigned DIST_W      = 9;
  localparam int unsigned MAX_CM      = 400;
  localparam int unsigned DEF_CLK_HZ  = 50_000_000;

  typedef logic [DIST_W-1:0] dist_cm_t;
  typedef logic [3:0]        bcd_t;
  typedef logic [6:0]        seg7_t;
  typedef logic [6:0]        duty_pct_t;

  typedef enum logic [1:0] {
    ZONE_STOP   = 2'd0,
    ZONE_SLOW   = 2'd1,
    ZONE_MEDIUM = 2'd2,
    ZONE_FAST   = 2'd3
  } speed_zone_t;

endpackage
