// tb_regunit: self-checking test of one operand-register digit position.
// Random clear/load_a/load_b/shift-input sequences are applied on a clock;
// a model in this testbench tracks the two stored digits. After every cycle
// the register outputs, the operand multiplexer outputs for every
// swap/show_reg/absel setting, and the comparator output for every possible
// comparison of the lower digits are checked against the model.
module tb_regunit;
  import bcd_pkg::*;

  logic       clk = 0;
  logic       clear, load_a, load_b, swap, show_reg, absel;
  bcd_digit_t a_in, b_in, a_q, b_q, op_a, op_b;
  cmp_t       cmp_in, cmp_out;
  int checks = 0, failures = 0;
  int ma = 0, mb = 0;        // model of the stored digits

  regunit dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0s (A=%0d B=%0d)", what, ma, mb);
    end
  endtask

  task automatic check_comb();
    for (int m = 0; m < 8; m++) begin
      {swap, show_reg, absel} = 3'(m);
      #1;
      if (show_reg)
        chk(op_a == 4'(absel ? mb : ma) && op_b == 4'd0, "show_reg mux");
      else if (swap)
        chk(op_a == 4'(mb) && op_b == 4'(ma), "swap mux");
      else
        chk(op_a == 4'(ma) && op_b == 4'(mb), "straight mux");
    end
    for (int k = 0; k < 3; k++) begin
      cmp_in = (k == 0) ? CMP_EQUAL : (k == 1) ? '{1'b1, 1'b0} : '{1'b0, 1'b1};
      #1;
      if (ma > mb)      chk(cmp_out == '{1'b1, 1'b0}, "compare gt");
      else if (ma < mb) chk(cmp_out == '{1'b0, 1'b1}, "compare lt");
      else              chk(cmp_out == cmp_in,        "compare equal passes lower");
    end
  endtask

  initial begin
    clear = 1; load_a = 0; load_b = 0; a_in = 0; b_in = 0;
    swap = 0; show_reg = 0; absel = 0; cmp_in = CMP_EQUAL;
    @(negedge clk);
    @(negedge clk);
    clear = 0;
    chk(a_q == 0 && b_q == 0, "clear");
    for (int n = 0; n < 400; n++) begin
      clear  = ($urandom_range(0, 19) == 0);
      load_a = $urandom_range(0, 1);
      load_b = $urandom_range(0, 1);
      a_in   = 4'($urandom_range(0, 9));
      b_in   = 4'($urandom_range(0, 9));
      @(negedge clk);
      if (clear) begin ma = 0; mb = 0; end
      else begin
        if (load_a) ma = a_in;
        if (load_b) mb = b_in;
      end
      chk(a_q == 4'(ma) && b_q == 4'(mb), "register contents");
      check_comb();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
