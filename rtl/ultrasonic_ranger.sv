// ultrasonic_ranger
//
// Measures the distance to an obstacle with an HC-SR04 style ultrasonic
// sensor.  The block raises trig_o (the sensor's trigger input, the
// transmitter side) for TRIG_US microseconds at the start of every
// measurement cycle, then times the echo pulse that comes back on echo_i
// (the sensor's echo output, the receiver side).
//
// The echo width is turned into centimetres without a divider: a prescaler
// counts CLKS_PER_CM clock cycles of echo-high time, and each time it wraps
// the centimetre counter steps by one.  One centimetre of range is 58 us of
// round-trip echo at 343 m/s, so the result is floor(echo_us / 58).  The
// counter saturates at MAX_CM.
//
// A new cycle starts every CYCLE_MS milliseconds.  If the echo has not
// ended when the cycle runs out (no echo, or an echo longer than the
// cycle), the block reports MAX_CM with timeout_o set, which downstream
// logic treats as "nothing in range".
//
// Interface and timing:
//   clk, rst_n   - clock and active-low synchronous reset
//   echo_i       - asynchronous echo line; it passes a two-flop
//                  synchroniser, which adds two cycles to both edges and
//                  so cancels out of the width.  Only a rising edge after
//                  the trigger starts a measurement, so the tail of an
//                  echo left over from the previous cycle is ignored.
//   trig_o       - trigger pulse, registered
//   dist_cm_o    - last measured range, held between measurements; 0
//                  after reset so the motors stay stopped until the first
//                  result
//   valid_o      - one-cycle pulse when dist_cm_o / timeout_o update
//   timeout_o    - the last measurement found no echo end inside the cycle
//
// The trigger and echo roles of the two pins follow the design; the pulse
// lengths, the cycle time and the 58 us/cm conversion are the usual
// HC-SR04 figures, chosen here.
module ultrasonic_ranger
  import distance_safety_pkg::*;
#(
  parameter int unsigned CLK_HZ    = DEF_CLK_HZ,
  parameter int unsigned TRIG_US   = 10,
  parameter int unsigned CYCLE_MS  = 60,
  parameter int unsigned US_PER_CM = 58,
  parameter int unsigned MAX_CM_P  = MAX_CM
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     echo_i,
  output logic     trig_o,
  output dist_cm_t dist_cm_o,
  output logic     valid_o,
  output logic     timeout_o
);

  localparam int unsigned CLKS_PER_US = CLK_HZ / 1_000_000;
  localparam int unsigned TRIG_CLKS   = TRIG_US * CLKS_PER_US;
  localparam int unsigned CYCLE_CLKS  = CYCLE_MS * 1000 * CLKS_PER_US;
  localparam int unsigned CLKS_PER_CM = US_PER_CM * CLKS_PER_US;
  localparam int unsigned CYC_W       = $clog2(CYCLE_CLKS);
  localparam int unsigned PRE_W       = $clog2(CLKS_PER_CM);

  typedef enum logic [1:0] {
    S_TRIG,       // trigger pulse is being sent
    S_WAIT_RISE,  // waiting for the echo to start
    S_MEASURE,    // echo is high, counting centimetres
    S_HOLD        // result latched, waiting for the next cycle
  } state_t;

  state_t            state;
  logic [CYC_W-1:0]  cycle_cnt;
  logic [PRE_W-1:0]  cm_pre;
  dist_cm_t          cm_cnt;
  logic [2:0]        echo_sync;
  logic              echo;
  logic              echo_rise;
  logic              cycle_end;

  assign echo      = echo_sync[1];
  assign echo_rise = echo_sync[1] & ~echo_sync[2];
  assign cycle_end = (cycle_cnt == CYC_W'(CYCLE_CLKS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) echo_sync <= '0;
    else        echo_sync <= {echo_sync[1:0], echo_i};
  end

  // Cycle timer: free-running period of CYCLE_CLKS.
  always_ff @(posedge clk) begin
    if (!rst_n || cycle_end) cycle_cnt <= '0;
    else                     cycle_cnt <= cycle_cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_TRIG;
      trig_o    <= 1'b0;
      cm_pre    <= '0;
      cm_cnt    <= '0;
      dist_cm_o <= '0;
      valid_o   <= 1'b0;
      timeout_o <= 1'b0;
    end else begin
      valid_o <= 1'b0;
      if (cycle_end) begin
        // A cycle that ends before the echo has ended reports out of range.
        if (state != S_HOLD) begin
          dist_cm_o <= dist_cm_t'(MAX_CM_P);
          timeout_o <= 1'b1;
          valid_o   <= 1'b1;
        end
        state  <= S_TRIG;
        trig_o <= 1'b0;
      end else begin
        unique case (state)
          S_TRIG: begin
            trig_o <= 1'b1;
            if (cycle_cnt == CYC_W'(TRIG_CLKS - 1)) state <= S_WAIT_RISE;
          end
          S_WAIT_RISE: begin
            trig_o <= 1'b0;
            cm_pre <= '0;
            cm_cnt <= '0;
            if (echo_rise) begin
              state  <= S_MEASURE;
              cm_pre <= PRE_W'(1);
            end
          end
          S_MEASURE: begin
            if (echo) begin
              if (cm_pre == PRE_W'(CLKS_PER_CM - 1)) begin
                cm_pre <= '0;
                if (cm_cnt != dist_cm_t'(MAX_CM_P)) cm_cnt <= cm_cnt + 1'b1;
              end else begin
                cm_pre <= cm_pre + 1'b1;
              end
            end else begin
              dist_cm_o <= cm_cnt;
              timeout_o <= 1'b0;
              valid_o   <= 1'b1;
              state     <= S_HOLD;
            end
          end
          S_HOLD: ;
          default: state <= S_TRIG;
        endcase
      end
    end
  end

  // The trigger pulse is TRIG_CLKS cycles long and only in S_TRIG.
  a_trig_in_trig_state: assert property (@(posedge clk) disable iff (!rst_n)
    trig_o |-> $past(state) == S_TRIG);

endmodule
