// tb_bcd_adder_top: end-to-end test of the three-digit BCD adder, run with the
// top at its default parameters.
// It works the board as a user would: operands are keyed in digit by digit
// with the digit/sign/absel switches and the load button (hundreds first),
// the clear button is pressed between some operations, and the result is read
// back only from the multiplexed seven-segment outputs and the overflow LED.
// The display is decoded by watching the anodes until all four digits have
// been seen after the inputs settled, and turning each cathode pattern back
// into a digit with a table of its own. Expected values come from signed
// integer arithmetic on the operands: sum = A + B, magnitude modulo 1000,
// overflow when the magnitude exceeds 999, and no minus sign on a zero.
// Directed cases cover each mechanism; the counters at the end confirm that
// addition, subtraction, operand swap, carry and borrow ripple, overflow,
// zero-sign correction, show-register for A and B, clear and the minus sign
// all happened, and each one that never did counts as a failure.
module tb_bcd_adder_top;
  import bcd_pkg::*;

  logic       clk = 0, rst;
  logic [3:0] sw_digit;
  logic       sw_sign, sw_absel, sw_showreg, btn_clear, btn_load;
  logic [3:0] an;
  seg_t       seg;
  logic       dp, led_overflow;
  int checks = 0, failures = 0;

  bcd_adder_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_add, n_sub, n_swap, n_carry, n_borrow, n_ovf, n_zero_pos;
  int n_show_a, n_show_b, n_clear, n_minus;

  // model of what was keyed in
  int ma, mb;        // magnitudes 0..999
  bit sa, sb;        // signs

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0s: A=%0s%0d B=%0s%0d", what, sa ? "-" : "+", ma,
               sb ? "-" : "+", mb);
    end
  endtask

  task automatic cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic press_load(input int digit, input bit sign, input bit which);
    sw_digit = 4'(digit); sw_sign = sign; sw_absel = which;
    cycles(2);
    btn_load = 1;
    cycles(5);
    btn_load = 0;
    sw_sign = ~sign;                       // moving a switch alone loads nothing
    sw_digit = 4'((digit + 3) % 10);
    cycles(5);
  endtask

  task automatic press_clear();
    btn_clear = 1;
    cycles(4);
    btn_clear = 0;
    cycles(4);
    ma = 0; mb = 0; sa = 0; sb = 0;
    n_clear++;
  endtask

  // Key in a full operand, hundreds digit first.
  task automatic enter(input bit which, input int mag, input bit sign);
    press_load(mag / 100, sign, which);
    press_load((mag / 10) % 10, sign, which);
    press_load(mag % 10, sign, which);
    if (which) begin mb = mag; sb = sign; end
    else       begin ma = mag; sa = sign; end
  endtask

  function automatic int decode(seg_t s);
    case (~s)
      7'h3F: return 0;  7'h06: return 1;  7'h5B: return 2;  7'h4F: return 3;
      7'h66: return 4;  7'h6D: return 5;  7'h7D: return 6;  7'h07: return 7;
      7'h7F: return 8;  7'h6F: return 9;  7'h40: return 10; 7'h00: return 11;
      default: return -1;
    endcase
  endfunction

  // Read the display: skip to the start of a fresh digit, then collect all four.
  task automatic read_display(output int mag, output int sign_code, output bit ok);
    int val [4];
    bit seen [4];
    logic [3:0] prev;
    int got;
    foreach (seen[i]) seen[i] = 0;
    ok = 1;
    prev = an;
    while (an == prev) @(negedge clk);
    got = 0;
    while (got < 4) begin
      for (int i = 0; i < 4; i++)
        if (an == ~(4'b1 << i) && !seen[i]) begin
          seen[i] = 1; val[i] = decode(seg); got++;
        end
      if (!$onehot(~an)) ok = 0;
      @(negedge clk);
    end
    for (int i = 0; i < 3; i++) if (val[i] < 0 || val[i] > 9) ok = 0;
    mag = (ok) ? val[2] * 100 + val[1] * 10 + val[0] : -1;
    sign_code = val[3];
  endtask

  task automatic check_result();
    int va, vb, sum, amag, emag, code, mag;
    bit eneg, eovf, ok;
    va = sa ? -ma : ma;
    vb = sb ? -mb : mb;
    sum = va + vb;
    amag = (sum < 0) ? -sum : sum;
    eovf = amag > 999;
    emag = amag % 1000;
    eneg = sum < 0;
    sw_showreg = 0;
    cycles(2);
    read_display(mag, code, ok);
    chk(ok, "display readable");
    chk(mag == emag, $sformatf("magnitude got %0d want %0d", mag, emag));
    chk(code == (eneg ? 10 : 11), $sformatf("sign digit code %0d want %0s", code,
                                            eneg ? "minus" : "blank"));
    chk(led_overflow == eovf, "overflow LED");
    chk(dp == 1'b1, "decimal point off");
    if (sa == sb) begin
      n_add++;
      if ((ma % 10) + (mb % 10) >= 10) n_carry++;
    end else begin
      n_sub++;
      if (mb > ma) n_swap++;
      if ((ma % 10) != (mb % 10) &&
          (((ma > mb) && (ma % 10) < (mb % 10)) || ((mb > ma) && (mb % 10) < (ma % 10))))
        n_borrow++;
    end
    if (eovf) n_ovf++;
    if (eneg) n_minus++;
    if (sum == 0 && (sa || sb)) n_zero_pos++;
  endtask

  task automatic check_show(input bit which);
    int code, mag, emag;
    bit ok, eneg;
    emag = which ? mb : ma;
    eneg = (which ? sb : sa) && emag != 0;
    sw_showreg = 1; sw_absel = which;
    cycles(2);
    read_display(mag, code, ok);
    chk(ok, "display readable (show register)");
    chk(mag == emag, $sformatf("show register %s got %0d want %0d",
                               which ? "B" : "A", mag, emag));
    chk(code == (eneg ? 10 : 11), "show register sign");
    chk(led_overflow == 0, "no overflow while showing a register");
    if (which) n_show_b++; else n_show_a++;
    sw_showreg = 0;
  endtask

  task automatic op(input int a, input bit asg, input int b, input bit bsg);
    enter(0, a, asg);
    enter(1, b, bsg);
    check_result();
  endtask

  initial begin
    int nrand;
    if (!$value$plusargs("NRAND=%d", nrand)) nrand = 24;
    rst = 1; sw_digit = 0; sw_sign = 0; sw_absel = 0; sw_showreg = 0;
    btn_clear = 0; btn_load = 0;
    ma = 0; mb = 0; sa = 0; sb = 0;
    cycles(4);
    rst = 0;
    cycles(4);
    check_result();                         // 0 + 0 after reset
    op(123, 0, 456, 0);                     // plain add
    op(258, 0, 367, 0);                     // carry through every digit
    op(999, 1, 1, 1);                       // overflow, negative
    op(500, 0, 500, 0);                     // overflow to 000
    op(500, 1, 500, 0);                     // equal magnitudes: +0
    op(700, 0, 215, 1);                     // subtract, borrow ripple
    op(215, 0, 700, 1);                     // subtract with swap, negative
    op(215, 1, 700, 0);                     // subtract with swap, positive
    op(0, 1, 0, 1);                         // -0 + -0 shows +0
    check_show(0);
    check_show(1);
    op(905, 1, 47, 0);
    check_show(0);
    check_show(1);
    press_clear();
    check_result();
    check_show(0);
    check_show(1);
    for (int n = 0; n < nrand; n++) begin
      if (n % 6 == 5) press_clear();
      if ($urandom_range(0, 1) != 0) enter(0, $urandom_range(0, 999), $urandom_range(0, 1) != 0);
      if ($urandom_range(0, 1) != 0) enter(1, $urandom_range(0, 999), $urandom_range(0, 1) != 0);
      check_result();
      if (n % 4 == 0) check_show(1'($urandom_range(0, 1)));
    end
    chk(n_add > 0,      "mechanism: addition");
    chk(n_sub > 0,      "mechanism: subtraction");
    chk(n_swap > 0,     "mechanism: operand swap");
    chk(n_carry > 0,    "mechanism: carry ripple");
    chk(n_borrow > 0,   "mechanism: borrow ripple");
    chk(n_ovf > 0,      "mechanism: overflow");
    chk(n_zero_pos > 0, "mechanism: zero shown positive");
    chk(n_show_a > 0,   "mechanism: show register A");
    chk(n_show_b > 0,   "mechanism: show register B");
    chk(n_clear > 0,    "mechanism: clear");
    chk(n_minus > 0,    "mechanism: minus sign");
    $display("mechanisms: add=%0d sub=%0d swap=%0d carry=%0d borrow=%0d overflow=%0d zero_pos=%0d show_a=%0d show_b=%0d clear=%0d minus=%0d",
             n_add, n_sub, n_swap, n_carry, n_borrow, n_ovf, n_zero_pos,
             n_show_a, n_show_b, n_clear, n_minus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
