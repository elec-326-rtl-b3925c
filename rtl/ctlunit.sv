// ctlunit: control unit of the three-digit sign-magnitude BCD adder.
//
// Holds the sign flip-flops of operands A and B. On each load pulse the sign
// switch is stored into the flip-flop chosen by absel (0: A, 1: B); clear
// zeroes both. From the two signs and the full-number magnitude comparison it
// drives the digit adders and computes the result sign:
//   equal signs:     add; result takes the common sign;
//   different signs: subtract; swap the operands when |A| < |B| so the larger
//                    magnitude is always the minuend; the result takes the
//                    sign of the larger operand;
//   show_reg = 1:    add (the register unit routes one register plus zero);
//                    the sign shown is that of the register chosen by absel.
// A zero result is always shown positive; a magnitude of 1000 or more
// (carry out of the hundreds digit while adding) raises overflow and keeps
// the sign. The zero and carry inputs come back from the digit adders; the
// add/subtract and swap outputs do not depend on them, so there is no loop.
// Sign flip-flops: clk rising edge; the rest is combinational.
// The sign flip-flops and the add/subtract/swap/sign rules follow the project
// specification; the zero-flag feedback and taking overflow as the hundreds
// carry while adding are this design's way of meeting it.
module ctlunit
  import bcd_pkg::*;
(
  input  logic clk,
  input  logic clear,        // synchronous clear of both sign flip-flops
  input  logic load,         // one-cycle load pulse
  input  logic absel,        // 0: operand A, 1: operand B
  input  logic sign_in,      // sign switch, 1 = negative
  input  logic show_reg,     // display a register instead of the result
  input  cmp_t cmp,          // comparison of the full A and B magnitudes
  input  logic msd_carry,    // carry/borrow out of the hundreds digit adder
  input  logic result_zero,  // all three result digits are 0
  output logic sign_a,
  output logic sign_b,
  output logic sub,          // digit adders subtract
  output logic swap,         // register units exchange A and B
  output logic sign_out,     // sign of the displayed value, 1 = negative
  output logic overflow
);

  logic raw_sign;

  always_ff @(posedge clk) begin
    if (clear) begin
      sign_a <= 1'b0;
      sign_b <= 1'b0;
    end else if (load) begin
      if (absel) sign_b <= sign_in;
      else       sign_a <= sign_in;
    end
  end

  assign sub  = !show_reg && (sign_a != sign_b);
  assign swap = !show_reg && (sign_a != sign_b) && cmp.a_lt_b;

  always_comb begin
    if (show_reg)              raw_sign = absel ? sign_b : sign_a;
    else if (sign_a == sign_b) raw_sign = sign_a;
    else if (cmp.a_lt_b)       raw_sign = sign_b;
    else                       raw_sign = sign_a;   // |A| > |B|, or equal (result 0)
  end

  // Carry out of the last digit only means overflow when adding; when
  // subtracting the larger magnitude is the minuend and no borrow is left.
  assign overflow = !sub && msd_carry;
  assign sign_out = raw_sign && !(result_zero && !overflow);

endmodule
