// tb_ctlunit: self-checking test of the control unit.
// For all four combinations of operand signs (loaded through the load/absel
// path) it sweeps every magnitude comparison, show_reg/absel setting and
// carry/zero feedback, and compares add/subtract, swap, result sign and
// overflow with a sign-magnitude reference written out here case by case.
// It also checks that clear zeroes the signs and that a load without the
// load pulse changes nothing.
module tb_ctlunit;
  import bcd_pkg::*;

  logic clk = 0;
  logic clear, load, absel, sign_in, show_reg, msd_carry, result_zero;
  cmp_t cmp;
  logic sign_a, sign_b, sub, swap, sign_out, overflow;
  int checks = 0, failures = 0;

  ctlunit dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0s: sa=%0d sb=%0d gt=%0d lt=%0d show=%0d absel=%0d c=%0d z=%0d",
               what, sign_a, sign_b, cmp.a_gt_b, cmp.a_lt_b, show_reg, absel,
               msd_carry, result_zero);
    end
  endtask

  task automatic load_sign(input logic which, input logic s);
    @(negedge clk);
    absel = which; sign_in = s; load = 1;
    @(negedge clk);
    load = 0; sign_in = ~s;      // a changed switch without a load must not matter
    @(negedge clk);
  endtask

  initial begin
    logic e_sub, e_swap, e_sign, e_ovf;
    clear = 1; load = 0; absel = 0; sign_in = 0; show_reg = 0;
    msd_carry = 0; result_zero = 0; cmp = CMP_EQUAL;
    @(negedge clk);
    clear = 0;
    for (int s = 0; s < 4; s++) begin
      load_sign(1'b0, s[0]);
      load_sign(1'b1, s[1]);
      chk(sign_a == s[0] && sign_b == s[1], "sign flip-flops");
      for (int m = 0; m < 48; m++) begin
        // cmp: 0 equal, 1 A>B, 2 A<B
        cmp         = (m % 3 == 0) ? CMP_EQUAL : (m % 3 == 1) ? '{1'b1, 1'b0} : '{1'b0, 1'b1};
        show_reg    = m[2];
        absel       = m[3];
        msd_carry   = m[4];
        result_zero = m[5];
        #1;
        if (show_reg) begin
          e_sub = 0; e_swap = 0; e_sign = absel ? s[1] : s[0];
        end else if (s[0] == s[1]) begin
          e_sub = 0; e_swap = 0; e_sign = s[0];
        end else begin
          e_sub  = 1;
          e_swap = (m % 3 == 2);
          e_sign = (m % 3 == 2) ? s[1] : s[0];
        end
        e_ovf = !e_sub && msd_carry;
        if (result_zero && !e_ovf) e_sign = 0;
        chk(sub == e_sub,       "add/subtract");
        chk(swap == e_swap,     "swap");
        chk(sign_out == e_sign, "result sign");
        chk(overflow == e_ovf,  "overflow");
      end
    end
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    chk(sign_a == 0 && sign_b == 0, "clear");
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
