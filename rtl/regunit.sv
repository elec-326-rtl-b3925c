// regunit: one digit position of the operand registers.
//
// Holds one BCD digit of operand A and one of operand B. Chained over the
// three digit positions, the A registers form a 4-bit-wide shift register and
// the B registers another one; both shift from the least towards the most
// significant digit, so the digit keyed in first ends up in the hundreds
// position after three loads. The least significant stage takes its shift
// input from the digit switches; every other stage takes the register output
// of the stage below. load_a or load_b (one-cycle enables) shifts one chain;
// clear zeroes both (synchronous).
//
// Output multiplexers feed the digit adder:
//   show_reg = 0: op_a/op_b = A/B, or B/A when swap = 1, so that the adder,
//                 which can only compute op_a - op_b, always subtracts the
//                 smaller magnitude from the larger;
//   show_reg = 1: op_a = the register chosen by absel (0: A, 1: B), op_b = 0,
//                 so the adder passes the register value through to the display.
// One stage of a ripple magnitude comparator is also here: it takes the
// comparison of all lower digits (cmp_in) and reports the comparison through
// this digit (cmp_out); a difference in this digit overrides the lower ones.
// The last stage's cmp_out is the comparison of the full numbers.
// Registers: clk rising edge; muxes and comparator are combinational.
// The shift-register organisation, the swap and add-zero multiplexers and the
// chained comparator follow the project specification; the two-flag encoding
// of the comparison and the synchronous clear are this design's choices.
module regunit
  import bcd_pkg::*;
(
  input  logic       clk,
  input  logic       clear,     // synchronous clear of both digits
  input  logic       load_a,    // shift the A chain one digit
  input  logic       load_b,    // shift the B chain one digit
  input  bcd_digit_t a_in,      // shift input of the A chain
  input  bcd_digit_t b_in,      // shift input of the B chain
  output bcd_digit_t a_q,       // stored A digit (shift output)
  output bcd_digit_t b_q,       // stored B digit (shift output)
  input  logic       swap,      // exchange the operands on op_a/op_b
  input  logic       show_reg,  // route one register to op_a and zero to op_b
  input  logic       absel,     // register shown when show_reg = 1
  output bcd_digit_t op_a,
  output bcd_digit_t op_b,
  input  cmp_t       cmp_in,    // comparison of the lower digits
  output cmp_t       cmp_out    // comparison through this digit
);

  always_ff @(posedge clk) begin
    if (clear) begin
      a_q <= '0;
      b_q <= '0;
    end else begin
      if (load_a) a_q <= a_in;
      if (load_b) b_q <= b_in;
    end
  end

  always_comb begin
    if (show_reg) begin
      op_a = absel ? b_q : a_q;
      op_b = '0;
    end else if (swap) begin
      op_a = b_q;
      op_b = a_q;
    end else begin
      op_a = a_q;
      op_b = b_q;
    end
  end

  always_comb begin
    if (a_q > b_q)      cmp_out = '{a_gt_b: 1'b1, a_lt_b: 1'b0};
    else if (a_q < b_q) cmp_out = '{a_gt_b: 1'b0, a_lt_b: 1'b1};
    else                cmp_out = cmp_in;
  end

endmodule
