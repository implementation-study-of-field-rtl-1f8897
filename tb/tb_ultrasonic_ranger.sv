// tb_ultrasonic_ranger -- self-checking testbench for ultrasonic_ranger.
//
// Runs the ranger at a 1 MHz clock (one cycle per microsecond) with a
// 10 ms measurement cycle and a 120 cm limit, against the HC-SR04 model.
// Checks: the trigger is 10 us wide and repeats every 10 ms; each echo
// width W gives floor(W / 58) cm, saturated at the limit; a missing echo
// gives the limit with the timeout flag; one result per cycle.
module tb_ultrasonic_ranger;
  import distance_safety_pkg::*;

  localparam int unsigned CLK_HZ   = 1_000_000;
  localparam int unsigned CYCLE_MS = 10;
  localparam int unsigned LIMIT    = 120;
  localparam int unsigned CYCLE    = CYCLE_MS * 1000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        echo, trig, valid, timeout;
  dist_cm_t    dist_cm;
  int unsigned echo_us = 0;
  logic        echo_en = 1'b1;
  int unsigned trig_count, trig_width;
  int          checks = 0, failures = 0;
  int unsigned valid_count = 0;
  longint unsigned cycle_no = 0, last_trig_rise = 0, trig_period = 0;
  logic        trig_q = 1'b0;

  always #5 clk = ~clk;

  ultrasonic_ranger #(.CLK_HZ(CLK_HZ), .CYCLE_MS(CYCLE_MS), .MAX_CM_P(LIMIT)) dut (
    .clk(clk), .rst_n(rst_n), .echo_i(echo), .trig_o(trig),
    .dist_cm_o(dist_cm), .valid_o(valid), .timeout_o(timeout));

  hcsr04_model #(.CLKS_PER_US(1)) sensor (
    .clk(clk), .trig_i(trig), .echo_us_i(echo_us), .echo_en_i(echo_en),
    .echo_o(echo), .trig_count_o(trig_count), .trig_width_o(trig_width));

  always @(posedge clk) begin
    cycle_no <= cycle_no + 1;
    trig_q   <= trig;
    if (trig && !trig_q) begin
      if (last_trig_rise != 0) trig_period <= cycle_no - last_trig_rise;
      last_trig_rise <= cycle_no;
    end
    if (valid) valid_count <= valid_count + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Sets the echo for the next cycle and waits for that cycle's result.
  task automatic measure(input int unsigned width_us, input bit en,
                         input int unsigned exp_cm, input bit exp_timeout);
    echo_us = width_us;
    echo_en = en;
    // The sensor takes its echo when the trigger falls.
    @(negedge trig);
    @(posedge clk iff valid);
    #1;
    check(dist_cm == dist_cm_t'(exp_cm),
          $sformatf("echo %0d us: dist_cm %0d, expected %0d", width_us, dist_cm, exp_cm));
    check(timeout == exp_timeout,
          $sformatf("echo %0d us: timeout %0b, expected %0b", width_us, timeout, exp_timeout));
  endtask

  int unsigned w, e;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // The first cycle starts right after reset.
    measure(9 * 58 + 29, 1'b1, 9, 1'b0);
    check(trig_width == 10, $sformatf("trigger width %0d us, expected 10", trig_width));
    measure(57, 1'b1, 0, 1'b0);
    measure(58, 1'b1, 1, 1'b0);
    measure(25 * 58, 1'b1, 25, 1'b0);
    measure(25 * 58 - 1, 1'b1, 24, 1'b0);
    check(trig_period == longint'(CYCLE), $sformatf("trigger period %0d, expected %0d", trig_period, CYCLE));
    measure(150 * 58, 1'b1, LIMIT, 1'b0);        // saturates at the limit
    measure(0, 1'b0, LIMIT, 1'b1);               // no echo: timeout
    measure(9950, 1'b1, LIMIT, 1'b1);            // echo outlasts the cycle
    measure(5 * 58, 1'b1, LIMIT, 1'b1);          // its tail is not a new echo
    measure(5 * 58, 1'b1, 5, 1'b0);
    for (int i = 0; i < 12; i++) begin
      w = 1 + ($urandom % 8000);
      e = w / 58;
      if (e > LIMIT) e = LIMIT;
      measure(w, 1'b1, e, 1'b0);
    end
    check(trig_width == 10, $sformatf("trigger width %0d us, expected 10", trig_width));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * CYCLE) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
