// tb_digitadd: exhaustive self-checking test of the BCD digit adder.
// Every pair of BCD digits, with and without carry/borrow in, in both add and
// subtract mode, is compared with a decimal reference computed here with
// integer arithmetic (modulo 10 and sign of the difference). The eight sample
// cases of the assignment's grading sheet are also checked explicitly.
// The block is combinational; a watchdog ends the run if it ever hangs.
module tb_digitadd;
  import bcd_pkg::*;

  bcd_digit_t a, b, s;
  logic       cbin, sub, cbout;
  int checks = 0, failures = 0;

  digitadd dut (.a(a), .b(b), .cbin(cbin), .sub(sub), .s(s), .cbout(cbout));

  task automatic apply(input int ia, ib, ic, isub, output int es, ec);
    int v;
    a = 4'(ia); b = 4'(ib); cbin = 1'(ic); sub = 1'(isub);
    #1;
    if (isub != 0) begin
      v = ia - ib - ic;
      ec = (v < 0) ? 1 : 0;
      es = (v < 0) ? v + 10 : v;
    end else begin
      v = ia + ib + ic;
      ec = (v >= 10) ? 1 : 0;
      es = v % 10;
    end
  endtask

  task automatic check(input int ia, ib, ic, isub, input int es, ec);
    checks++;
    if (s !== 4'(es) || cbout !== 1'(ec)) begin
      failures++;
      $display("FAIL %0s a=%0d b=%0d c=%0d: got s=%0d c=%0d, want s=%0d c=%0d",
               isub ? "sub" : "add", ia, ib, ic, s, cbout, es, ec);
    end
  endtask

  // sample rows: a, b, carry/borrow in, sub, expected digit, expected out
  int samples [8][6] = '{
    '{3, 6, 0, 0, 9, 0}, '{9, 2, 0, 0, 1, 1}, '{3, 6, 1, 0, 0, 1}, '{9, 2, 1, 0, 2, 1},
    '{3, 6, 0, 1, 7, 1}, '{9, 2, 0, 1, 7, 0}, '{3, 6, 1, 1, 6, 1}, '{9, 2, 1, 1, 6, 0}};

  initial begin
    int es, ec;
    for (int m = 0; m < 2; m++)
      for (int c = 0; c < 2; c++)
        for (int i = 0; i < 10; i++)
          for (int j = 0; j < 10; j++) begin
            apply(i, j, c, m, es, ec);
            check(i, j, c, m, es, ec);
          end
    foreach (samples[k]) begin
      apply(samples[k][0], samples[k][1], samples[k][2], samples[k][3], es, ec);
      check(samples[k][0], samples[k][1], samples[k][2], samples[k][3],
            samples[k][4], samples[k][5]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
