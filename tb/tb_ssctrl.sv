// tb_ssctrl: self-checking test of the display multiplexer.
// With a 2-bit prescaler each digit should stay lit for exactly 4 cycles and
// the digits should come in the order units, tens, hundreds, sign. On every
// cycle it checks that exactly one anode is low, that the cathodes carry the
// pattern of the digit whose anode is low (worked out from an independent
// segment table) and that the decimal point is off; it counts the dwell time
// and order of every digit. Digit values and the sign change at random.
module tb_ssctrl;
  import bcd_pkg::*;

  localparam int unsigned DIV = 2;

  logic       clk = 0, rst;
  bcd_digit_t digits [NDIGITS];
  logic       neg;
  logic [3:0] an;
  seg_t       seg;
  logic       dp;
  int checks = 0, failures = 0;

  ssctrl #(.DIV_BITS(DIV)) dut (.*);

  always #5 clk = ~clk;

  // active-low {g..a} patterns of 0..9, written as lit-segment masks
  function automatic seg_t expect_seg(int pos);
    logic [6:0] lit [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};
    if (pos == 3) return neg ? ~7'h40 : 7'h7F;
    return ~lit[digits[pos]];
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0s at %0t: an=%b seg=%b", what, $time, an, seg);
    end
  endtask

  initial begin
    int pos, prev_pos, dwell, switches;
    rst = 1; neg = 0;
    foreach (digits[i]) digits[i] = 4'(i + 1);
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    prev_pos = -1; dwell = 0; switches = 0;
    for (int n = 0; n < 400; n++) begin
      if (n % 7 == 0) begin
        foreach (digits[i]) digits[i] = 4'($urandom_range(0, 9));
        neg = $urandom_range(0, 1);
      end
      #1;
      pos = -1;
      for (int i = 0; i < 4; i++) if (an == ~(4'b1 << i)) pos = i;
      chk(pos >= 0, "exactly one anode low");
      if (pos >= 0) chk(seg == expect_seg(pos), "cathodes match lit digit");
      chk(dp == 1'b1, "decimal point off");
      if (pos == prev_pos) dwell++;
      else begin
        if (prev_pos >= 0) begin
          chk(pos == (prev_pos + 1) % 4, "scan order");
          // the first digit after reset is cut short by the reset cycle
          if (switches > 0) chk(dwell == (1 << DIV), "dwell time");
          switches++;
        end
        dwell = 1;
        prev_pos = pos;
      end
      @(negedge clk);
    end
    chk(switches >= 90, "scan kept running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
