// tb_seg7_decoder -- self-checking testbench for seg7_decoder.
// Compares all sixteen codes with a table of which segments (A..G) each
// digit lights on a common-anode display (lit = 0), including the 40h
// pattern of "0" and the 10h pattern of "9" seen on the real board.
module tb_seg7_decoder;
  import distance_safety_pkg::*;

  bcd_t  digit;
  seg7_t seg_n;
  int    checks = 0, failures = 0;

  seg7_decoder dut (.digit_i(digit), .seg_n_o(seg_n));

  // Segments lit by each digit, as letters.
  function automatic string lit_segments(input int d);
    case (d)
      0: return "ABCDEF";   1: return "BC";      2: return "ABDEG";
      3: return "ABCDG";    4: return "BCFG";    5: return "ACDFG";
      6: return "ACDEFG";   7: return "ABC";     8: return "ABCDEFG";
      9: return "ABCDFG";   default: return "";
    endcase
  endfunction

  function automatic seg7_t expected(input int d);
    string s = lit_segments(d);
    seg7_t v = '1;
    for (int i = 0; i < s.len(); i++) v[s[i] - "A"] = 1'b0;
    return v;
  endfunction

  initial begin
    for (int d = 0; d < 16; d++) begin
      digit = bcd_t'(d);
      #1;
      checks++;
      if (seg_n !== expected(d)) begin
        failures++;
        $display("FAIL: digit %0d -> %h, expected %h", d, seg_n, expected(d));
      end
    end
    digit = 4'd0; #1; checks++; if (seg_n != 7'h40) begin failures++; $display("FAIL: 0 is not 40h"); end
    digit = 4'd9; #1; checks++; if (seg_n != 7'h10) begin failures++; $display("FAIL: 9 is not 10h"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
