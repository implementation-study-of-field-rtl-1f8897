// tb_motor_pwm -- self-checking testbench for motor_pwm.
// Runs at a 1 MHz clock and a 1 kHz PWM (10 clocks per step, 1000 per
// period).  For a set of duty cycles it counts, over one whole period
// measured from period_start_o, how many clocks pwm1 and pwm3 are high
// (expected duty * 10), checks that pwm2 and pwm4 stay low, that the
// period is exactly 1000 clocks and that a duty change mid-period only
// takes effect at the next period.
module tb_motor_pwm;
  import distance_safety_pkg::*;

  localparam int unsigned PERIOD = 1000;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  duty_pct_t duty = '0;
  logic      p1, p2, p3, p4, ps;
  int        checks = 0, failures = 0;

  always #5 clk = ~clk;

  motor_pwm #(.CLK_HZ(1_000_000), .PWM_HZ(1000)) dut (
    .clk(clk), .rst_n(rst_n), .duty_i(duty),
    .pwm1_o(p1), .pwm2_o(p2), .pwm3_o(p3), .pwm4_o(p4), .period_start_o(ps));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Measures one full period, from a period_start pulse to the next one.
  // Outputs are sampled on the falling clock edge.
  task automatic wait_period_start();
    do @(negedge clk); while (!ps);
  endtask

  task automatic measure_period(input int exp_high, input string tag);
    int hi1 = 0, hi3 = 0, lo24 = 0, len = 0;
    wait_period_start();
    do begin
      len++;
      hi1 += int'(p1);
      hi3 += int'(p3);
      lo24 += int'(p2 | p4);
      @(negedge clk);
    end while (!ps);
    check(len == PERIOD, $sformatf("%s: period %0d clocks", tag, len));
    check(hi1 == exp_high, $sformatf("%s: pwm1 high %0d, expected %0d", tag, hi1, exp_high));
    check(hi3 == exp_high, $sformatf("%s: pwm3 high %0d, expected %0d", tag, hi3, exp_high));
    check(lo24 == 0, $sformatf("%s: pwm2/pwm4 high %0d clocks", tag, lo24));
  endtask

  initial begin
    int d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 8; i++) begin
      case (i)
        0: d = 0;   1: d = 100; 2: d = 40;  3: d = 70;
        4: d = 1;   5: d = 99;  6: d = 50;  default: d = 127;
      endcase
      duty = duty_pct_t'(d);
      // The duty is taken at the start of a period: skip the one running.
      wait_period_start();
      measure_period((d > 100 ? 100 : d) * 10, $sformatf("duty %0d", d));
    end
    // A change in the middle of a period waits for the next one.
    duty = 7'd20;
    wait_period_start();
    wait_period_start();
    repeat (150) @(negedge clk);
    duty = 7'd80;
    begin
      int hi = 0;
      do begin hi += int'(p1); @(negedge clk); end while (!ps);
      check(hi == 200 - 150, $sformatf("mid-period change: %0d high clocks after it", hi));
    end
    measure_period(800, "after the change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
