// hcsr04_model -- behavioural model of an HC-SR04 ultrasonic sensor, for
// testbenches only (not synthesizable logic of the design).
//
// When the trigger input has been high for at least 10 us and falls, the
// model waits BURST_US (the 40 kHz burst and its flight start) and then
// raises the echo output for echo_us_i microseconds, the round-trip time
// of the sound.  With echo_en_i low it never answers, as when the sensor
// is missing or broken.  Time is counted in clock cycles of clk, CLKS_PER_US
// cycles per microsecond.  A trigger that arrives while an echo is still
// pending is ignored, as the real module does.
//
// Outputs for checking: trig_count_o counts trigger pulses and
// trig_width_o holds the width of the last one, in clock cycles.
module hcsr04_model #(
  parameter int unsigned CLKS_PER_US = 1,
  parameter int unsigned BURST_US    = 100
) (
  input  logic        clk,
  input  logic        trig_i,
  input  int unsigned echo_us_i,
  input  logic        echo_en_i,
  output logic        echo_o,
  output int unsigned trig_count_o,
  output int unsigned trig_width_o
);

  int unsigned trig_len = 0;
  int unsigned wait_cnt = 0;
  int unsigned echo_cnt = 0;
  logic        busy     = 1'b0;
  logic        trig_q   = 1'b0;

  initial begin
    echo_o       = 1'b0;
    trig_count_o = 0;
    trig_width_o = 0;
  end

  always @(posedge clk) begin
    trig_q <= trig_i;
    if (trig_i) trig_len <= trig_len + 1;
    if (trig_q && !trig_i) begin
      trig_count_o <= trig_count_o + 1;
      trig_width_o <= trig_len;
      trig_len     <= 0;
      if (!busy && echo_en_i && trig_len >= 10 * CLKS_PER_US) begin
        busy     <= 1'b1;
        wait_cnt <= BURST_US * CLKS_PER_US;
        echo_cnt <= echo_us_i * CLKS_PER_US;
      end
    end
    if (busy) begin
      if (wait_cnt != 0) begin
        wait_cnt <= wait_cnt - 1;
      end else if (echo_cnt != 0) begin
        echo_o   <= 1'b1;
        echo_cnt <= echo_cnt - 1;
      end else begin
        echo_o <= 1'b0;
        busy   <= 1'b0;
      end
    end
  end

endmodule
