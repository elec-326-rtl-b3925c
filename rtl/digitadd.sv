// digitadd: one BCD digit adder/subtractor.
//
// Adds (sub = 0) or subtracts (sub = 1) two BCD digits a and b together with a
// carry or borrow input cbin, giving a BCD digit s and a carry or borrow
// output cbout. It works in two steps, as the class project describes: a
// plain binary add or subtract of the digits, then a second add of a
// correction value whenever the binary result is not a valid BCD digit.
//   add:      t = a + b + cin (0..19). If t > 9, add 6 (drop bit 4), cout = 1.
//   subtract: t = a - b - bin (-10..9). If t < 0, add 10 (i.e. subtract 6
//             modulo 16), bout = 1.
// Three of these in a ripple chain form the three-digit adder; in subtract
// mode the caller guarantees a >= b over the whole number, so the last
// borrow is always 0. Inputs above 9 are outside the contract.
// Purely combinational; no clock.
module digitadd
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cbin,   // carry in (add) or borrow in (subtract)
  input  logic       sub,    // 1: s = a - b - cbin, 0: s = a + b + cbin
  output bcd_digit_t s,
  output logic       cbout   // carry out (add) or borrow out (subtract)
);

  logic [4:0] t;     // first, binary, result (two's complement when subtracting)
  logic [3:0] corr;  // correction value added in the second step

  always_comb begin
    if (sub) begin
      t     = {1'b0, a} - {1'b0, b} - {4'b0, cbin};
      cbout = t[4];                      // negative result: borrow from next digit
      corr  = cbout ? 4'd10 : 4'd0;
    end else begin
      t     = {1'b0, a} + {1'b0, b} + {4'b0, cbin};
      cbout = (t > 5'd9);                // beyond one decimal digit: carry
      corr  = cbout ? 4'd6 : 4'd0;
    end
    s = t[3:0] + corr;                   // second adder, modulo 16
  end

endmodule
