// tb_range_to_digits -- self-checking testbench for range_to_digits.
// Sweeps every 9-bit range and compares the two digits with a reference
// computed by repeated subtraction, with ranges above 99 shown as 99.
module tb_range_to_digits;
  import distance_safety_pkg::*;

  dist_cm_t dist_cm;
  bcd_t     tens, units;
  int       checks = 0, failures = 0;

  range_to_digits dut (.dist_cm_i(dist_cm), .tens_o(tens), .units_o(units));

  initial begin
    for (int d = 0; d < 512; d++) begin
      int r, t;
      dist_cm = dist_cm_t'(d);
      #1;
      r = (d > 99) ? 99 : d;
      t = 0;
      while (r >= 10) begin r -= 10; t++; end
      checks++;
      if (tens != bcd_t'(t) || units != bcd_t'(r)) begin
        failures++;
        $display("FAIL: %0d cm -> %0d%0d, expected %0d%0d", d, tens, units, t, r);
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
