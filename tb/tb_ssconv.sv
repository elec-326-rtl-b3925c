// tb_ssconv: self-checking test of the seven-segment converter.
// For all 16 input codes the expected lit segments are listed here as letter
// strings ("abcdefg" naming the lit segments), turned into an active-low
// {g..a} pattern, and compared with the converter's output. Codes 0..9 are
// digits, code 10 is the minus sign (segment g only), the rest are blank.
module tb_ssconv;
  import bcd_pkg::*;

  bcd_digit_t code;
  seg_t       seg;
  int checks = 0, failures = 0;

  ssconv dut (.code(code), .seg(seg));

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg",
                      "abc", "abcdefg", "abcdfg", "g", "", "", "", "", ""};

  function automatic seg_t pattern(string s);
    seg_t p = '1;                      // all off
    for (int i = 0; i < s.len(); i++) p[3'(s[i] - 8'h61)] = 1'b0;
    return p;
  endfunction

  initial begin
    for (int c = 0; c < 16; c++) begin
      code = 4'(c);
      #1;
      checks++;
      if (seg !== pattern(lit[c])) begin
        failures++;
        $display("FAIL code %0d: got %b want %b", c, seg, pattern(lit[c]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
