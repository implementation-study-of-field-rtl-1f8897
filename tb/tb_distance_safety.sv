// tb_distance_safety -- end-to-end testbench for the collision avoidance
// controller.
//
// The controller runs at a 1 MHz clock with a 10 ms measurement cycle and a
// 1 kHz PWM (1000 clocks per period); the bands are the defaults (stop below
// 10 cm, 40 % below 20 cm, 70 % below 40 cm, 100 % beyond).  An HC-SR04 model
// answers each trigger with an echo of 58 us per cm plus 29 us.
//
// For each obstacle distance the testbench waits for the measurement, then
// checks both digits on the segment lines against its own segment table and
// the motor duty by counting pwm1/pwm3 high clocks over a full PWM period.
// The logic-analyser capture case - an obstacle at 9 cm - must show 10h on
// the units lines, 40h on the tens lines and leave all pwm lines low.
// It counts how often each mechanism happened: every speed band, the
// display clamp above 99 cm, a missing echo (timeout), the run switch off,
// the speed rising and falling between measurements; a mechanism that
// never happened is a failure.  It also checks the 10 ms trigger period.
module tb_distance_safety;

  localparam int unsigned CLK_HZ   = 1_000_000;
  localparam int unsigned CYCLE_MS = 10;
  localparam int unsigned CYCLE    = CYCLE_MS * 1000;
  localparam int unsigned PERIOD   = 1000;

  logic clk = 1'b0;
  logic pulse_pin, Trigger_pin, sw;
  logic topsegA, topsegB, topsegC, topsegD, topsegE, topsegF, topsegG;
  logic topsegA1, topsegB1, topsegC1, topsegD1, topsegE1, topsegF1, topsegG1;
  logic pwm1, pwm2, pwm3, pwm4;

  int unsigned echo_us = 0;
  logic        echo_en = 1'b1;
  int unsigned trig_count, trig_width;
  int          checks = 0, failures = 0;

  // Mechanism counters.
  int n_stop = 0, n_slow = 0, n_medium = 0, n_fast = 0;
  int n_clamp = 0, n_timeout = 0, n_switch_off = 0, n_speed_up = 0, n_slow_down = 0;
  int last_duty = -1;

  longint unsigned cycle_no = 0, last_rise = 0, trig_period = 0;
  logic trig_q = 1'b0;

  always #5 clk = ~clk;

  distance_safety #(.CLK_HZ(CLK_HZ), .CYCLE_MS(CYCLE_MS)) dut (.*);

  hcsr04_model #(.CLKS_PER_US(CLK_HZ / 1_000_000)) sensor (
    .clk(clk), .trig_i(Trigger_pin), .echo_us_i(echo_us), .echo_en_i(echo_en),
    .echo_o(pulse_pin), .trig_count_o(trig_count), .trig_width_o(trig_width));

  always @(posedge clk) begin
    cycle_no <= cycle_no + 1;
    trig_q   <= Trigger_pin;
    if (Trigger_pin && !trig_q) begin
      if (last_rise != 0) trig_period <= cycle_no - last_rise;
      last_rise <= cycle_no;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference: active-low segment pattern {G..A} of one digit.
  function automatic logic [6:0] seg_ref(input int d);
    string s;
    logic [6:0] v = '1;
    case (d)
      0: s = "ABCDEF";   1: s = "BC";      2: s = "ABDEG";
      3: s = "ABCDG";    4: s = "BCFG";    5: s = "ACDFG";
      6: s = "ACDEFG";   7: s = "ABC";     8: s = "ABCDEFG";
      default: s = "ABCDFG";
    endcase
    for (int i = 0; i < s.len(); i++) v[s[i] - "A"] = 1'b0;
    return v;
  endfunction

  function automatic int duty_ref(input int cm, input bit run);
    if (!run)         return 0;
    if (cm < 10)      return 0;
    if (cm < 20)      return 40;
    if (cm < 40)      return 70;
    return 100;
  endfunction

  // One measurement: program the sensor, wait for the result, check it.
  // shown_cm is the range the controller should have measured.
  task automatic step(input int cm, input bit en, input bit run, input string tag);
    int shown, exp_duty, hi1, hi3, hi24, len;
    logic [6:0] units_n, tens_n;
    echo_us = cm * 58 + 29;
    echo_en = en;
    sw      = run;
    @(negedge Trigger_pin);
    @(posedge clk iff dut.u_ranger.valid_o);
    repeat (4) @(negedge clk);
    shown = en ? cm : 400;
    units_n = {topsegG, topsegF, topsegE, topsegD, topsegC, topsegB, topsegA};
    tens_n  = {topsegG1, topsegF1, topsegE1, topsegD1, topsegC1, topsegB1, topsegA1};
    check(units_n == seg_ref((shown > 99 ? 99 : shown) % 10),
          $sformatf("%s: units lines %h", tag, units_n));
    check(tens_n == seg_ref((shown > 99 ? 99 : shown) / 10),
          $sformatf("%s: tens lines %h", tag, tens_n));
    // The new duty is taken at the next PWM period start; measure the one after.
    do @(negedge clk); while (!dut.u_pwm.period_start_o);
    do @(negedge clk); while (!dut.u_pwm.period_start_o);
    hi1 = 0; hi3 = 0; hi24 = 0; len = 0;
    do begin
      len++; hi1 += int'(pwm1); hi3 += int'(pwm3); hi24 += int'(pwm2 | pwm4);
      @(negedge clk);
    end while (!dut.u_pwm.period_start_o);
    exp_duty = duty_ref(shown, run);
    check(len == PERIOD, $sformatf("%s: PWM period %0d", tag, len));
    check(hi1 == exp_duty * 10 && hi3 == exp_duty * 10,
          $sformatf("%s: pwm1/pwm3 high %0d/%0d, expected %0d", tag, hi1, hi3, exp_duty * 10));
    check(hi24 == 0, $sformatf("%s: pwm2/pwm4 went high", tag));
    // Mechanism counts, from what was observed on the pins.
    if (hi1 == exp_duty * 10) begin
      if (!run) n_switch_off++;
      else if (exp_duty == 0)   n_stop++;
      else if (exp_duty == 40)  n_slow++;
      else if (exp_duty == 70)  n_medium++;
      else                      n_fast++;
      if (last_duty >= 0 && exp_duty > last_duty) n_speed_up++;
      if (last_duty >= 0 && exp_duty < last_duty) n_slow_down++;
      last_duty = exp_duty;
    end
    if (shown > 99 && units_n == seg_ref(9) && tens_n == seg_ref(9)) n_clamp++;
    if (!en && dut.u_ranger.timeout_o) n_timeout++;
  endtask

  initial begin
    sw = 1'b1;
    // Approach an obstacle from far away, as the vehicle would.
    step(150, 1'b1, 1'b1, "150 cm");
    step(60, 1'b1, 1'b1, "60 cm");
    step(35, 1'b1, 1'b1, "35 cm");
    step(18, 1'b1, 1'b1, "18 cm");
    step(12, 1'b1, 1'b1, "12 cm");
    step(9, 1'b1, 1'b1, "9 cm");
    // The capture at 9 cm: units "9" = 10h, tens "0" = 40h, motors off.
    check({topsegG, topsegF, topsegE, topsegD, topsegC, topsegB, topsegA} == 7'h10,
          "9 cm: units lines are not 10h");
    check({topsegG1, topsegF1, topsegE1, topsegD1, topsegC1, topsegB1, topsegA1} == 7'h40,
          "9 cm: tens lines are not 40h");
    step(3, 1'b1, 1'b1, "3 cm");
    step(0, 1'b1, 1'b1, "0 cm");
    // Obstacle removed again, then no echo at all.
    step(25, 1'b1, 1'b1, "25 cm");
    step(99, 1'b1, 1'b1, "99 cm");
    step(0, 1'b0, 1'b1, "no echo");
    // Run switch off with a clear road, then on again.
    step(80, 1'b1, 1'b0, "switch off");
    step(80, 1'b1, 1'b1, "switch on");
    for (int i = 0; i < 6; i++) begin
      int cm = $urandom % 200;
      step(cm, 1'b1, 1'b1, $sformatf("random %0d cm", cm));
    end
    check(trig_period == longint'(CYCLE), $sformatf("trigger period %0d", trig_period));
    check(trig_width == 10, $sformatf("trigger width %0d", trig_width));
    $display("mechanisms: stop=%0d slow=%0d medium=%0d fast=%0d clamp=%0d timeout=%0d switch_off=%0d speed_up=%0d slow_down=%0d",
             n_stop, n_slow, n_medium, n_fast, n_clamp, n_timeout, n_switch_off, n_speed_up, n_slow_down);
    check(n_stop > 0, "stop band never reached");
    check(n_slow > 0, "slow band never reached");
    check(n_medium > 0, "medium band never reached");
    check(n_fast > 0, "fast band never reached");
    check(n_clamp > 0, "display clamp never happened");
    check(n_timeout > 0, "echo timeout never happened");
    check(n_switch_off > 0, "run switch never turned off");
    check(n_speed_up > 0, "speed never rose");
    check(n_slow_down > 0, "speed never fell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60 * CYCLE) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
