// tb_distance_safety_full -- the controller at its default size: 50 MHz
// clock, one measurement every 60 ms, 1 kHz PWM.
//
// Two complete operations against the HC-SR04 model: an obstacle at 30 cm
// (display "30", motors at 70 % duty) and then at 9 cm (display "09" with
// 10h on the units lines and 40h on the tens lines, motors stopped).  It
// also checks the 10 us trigger and the 60 ms measurement period.
module tb_distance_safety_full;

  localparam int unsigned CLKS_PER_US = 50;
  localparam int unsigned PERIOD      = 50_000;   // 1 ms PWM period

  logic clk = 1'b0;
  logic pulse_pin, Trigger_pin, sw;
  logic topsegA, topsegB, topsegC, topsegD, topsegE, topsegF, topsegG;
  logic topsegA1, topsegB1, topsegC1, topsegD1, topsegE1, topsegF1, topsegG1;
  logic pwm1, pwm2, pwm3, pwm4;

  int unsigned echo_us = 0;
  int unsigned trig_count, trig_width;
  int          checks = 0, failures = 0;
  longint unsigned cycle_no = 0, last_rise = 0, trig_period = 0;
  logic trig_q = 1'b0;

  always #10 clk = ~clk;

  distance_safety dut (.*);

  hcsr04_model #(.CLKS_PER_US(CLKS_PER_US)) sensor (
    .clk(clk), .trig_i(Trigger_pin), .echo_us_i(echo_us), .echo_en_i(1'b1),
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

  task automatic operate(input int cm, input logic [6:0] units_n, input logic [6:0] tens_n,
                         input int duty_pct);
    int hi, len;
    echo_us = cm * 58 + 29;
    @(negedge Trigger_pin);
    @(posedge clk iff dut.u_ranger.valid_o);
    repeat (4) @(negedge clk);
    check({topsegG, topsegF, topsegE, topsegD, topsegC, topsegB, topsegA} == units_n,
          $sformatf("%0d cm: units lines wrong", cm));
    check({topsegG1, topsegF1, topsegE1, topsegD1, topsegC1, topsegB1, topsegA1} == tens_n,
          $sformatf("%0d cm: tens lines wrong", cm));
    do @(negedge clk); while (!dut.u_pwm.period_start_o);
    do @(negedge clk); while (!dut.u_pwm.period_start_o);
    hi = 0; len = 0;
    do begin
      len++; hi += int'(pwm1 & pwm3) - int'(pwm2 | pwm4);
      @(negedge clk);
    end while (!dut.u_pwm.period_start_o);
    check(len == PERIOD, $sformatf("%0d cm: PWM period %0d clocks", cm, len));
    check(hi == duty_pct * PERIOD / 100, $sformatf("%0d cm: %0d high clocks", cm, hi));
  endtask

  initial begin
    sw = 1'b1;
    // "30": units 0 = all but G lit, tens 3 = A B C D G lit (common anode).
    operate(30, 7'b100_0000, 7'b011_0000, 70);
    operate(9, 7'h10, 7'h40, 0);
    check(trig_width == 10 * CLKS_PER_US, $sformatf("trigger width %0d clocks", trig_width));
    check(trig_period == 60 * 1000 * CLKS_PER_US, $sformatf("trigger period %0d clocks", trig_period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * 60 * 1000 * CLKS_PER_US) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
