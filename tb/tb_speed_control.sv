// tb_speed_control -- self-checking testbench for speed_control.
// Sweeps every range with the run switch on and off, with the default
// bands (stop below 10 cm, 40 % below 20 cm, 70 % below 40 cm, else 100 %)
// and again with other bands, and checks zone and duty against a reference.
module tb_speed_control;
  import distance_safety_pkg::*;

  dist_cm_t    dist_cm;
  logic        run;
  duty_pct_t   duty_a, duty_b;
  speed_zone_t zone_a, zone_b;
  int          checks = 0, failures = 0;

  speed_control dut_a (.dist_cm_i(dist_cm), .run_i(run), .duty_o(duty_a), .zone_o(zone_a));
  speed_control #(.STOP_CM(25), .SLOW_CM(50), .MEDIUM_CM(100),
                  .SLOW_DUTY(30), .MEDIUM_DUTY(60), .FAST_DUTY(90))
    dut_b (.dist_cm_i(dist_cm), .run_i(run), .duty_o(duty_b), .zone_o(zone_b));

  task automatic expect_band(input int d, input int b0, b1, b2, input int p1, p2, p3,
                             input duty_pct_t duty, input speed_zone_t zone, input string tag);
    int          ed;
    speed_zone_t ez;
    if (d < b0)      begin ez = ZONE_STOP;   ed = 0;  end
    else if (d < b1) begin ez = ZONE_SLOW;   ed = p1; end
    else if (d < b2) begin ez = ZONE_MEDIUM; ed = p2; end
    else             begin ez = ZONE_FAST;   ed = p3; end
    if (!run) ed = 0;
    checks++;
    if (duty != duty_pct_t'(ed) || zone != ez) begin
      failures++;
      $display("FAIL %s: %0d cm run=%0b -> duty %0d zone %0d, expected %0d %0d",
               tag, d, run, duty, zone, ed, ez);
    end
  endtask

  initial begin
    for (int r = 0; r < 2; r++) begin
      for (int d = 0; d < 512; d++) begin
        run     = r[0];
        dist_cm = dist_cm_t'(d);
        #1;
        expect_band(d, 10, 20, 40, 40, 70, 100, duty_a, zone_a, "default");
        expect_band(d, 25, 50, 100, 30, 60, 90, duty_b, zone_b, "custom");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
