// bcd_adder_top: three-digit sign-magnitude BCD adder/subtractor for an FPGA
// board with toggle switches, two push-buttons, an LED and a four-digit
// seven-segment display.
//
// Operands are 13-bit sign-magnitude numbers: three BCD digits and a sign.
// They are keyed in one digit at a time: set the four digit switches, the
// sign switch and absel (0: A, 1: B), then press load. Each press shifts the
// digit into the units position of the chosen operand (earlier digits move
// one place up) and stores the sign. clear zeroes both operands and signs.
//
// Datapath: three regunit stages (the operand shift registers, the operand
// swap/show muxes and a ripple magnitude comparator running units to
// hundreds) feed three digitadd stages chained through their carry/borrow
// (units to hundreds, carry into the units digit is 0). ctlunit looks at the
// two signs and the comparison and chooses add or subtract, whether to swap
// so the larger magnitude is the minuend, and the result sign; ssctrl scans
// the three result digits and the sign onto the display. With show_reg = 1
// the display shows the operand chosen by absel instead of the result (the
// adders add zero to it). led_overflow lights when a sum needs a fourth digit.
//
// The button inputs pass through a two-flip-flop synchronizer; load acts on
// the rising edge of the synchronized button, so one press loads one digit.
// Switch debouncing is expected outside. The result is combinational from
// the registers: it is valid the cycle after a load, and the display shows it
// within one scan of 4 * 2**DIV_BITS cycles.
// The block structure and the switch/button/display usage follow the project
// specification; the clock, reset, button synchronizers and load edge
// detector are this design's additions. dp is tied off (decimal point unused).
module bcd_adder_top
  import bcd_pkg::*;
#(
  parameter int unsigned DIV_BITS = 16   // display prescaler width (ssctrl)
) (
  input  logic       clk,
  input  logic       rst,          // synchronous, active high (configuration reset)
  input  logic [3:0] sw_digit,     // BCD digit to load
  input  logic       sw_sign,      // sign to load, 1 = negative
  input  logic       sw_absel,     // 0: operand A, 1: operand B
  input  logic       sw_showreg,   // 1: display the operand chosen by sw_absel
  input  logic       btn_clear,    // clear both operands
  input  logic       btn_load,     // load the next digit
  output logic [3:0] an,           // display anodes, active low, [0] = rightmost
  output seg_t       seg,          // display cathodes {g,f,e,d,c,b,a}, active low
  output logic       dp,           // decimal point cathode, held off
  output logic       led_overflow
);

  // ---- push-button synchronizers and load edge detector ----
  logic [1:0] load_sync, clear_sync;
  logic       load_prev;
  logic       load_pulse, clear_lvl;

  always_ff @(posedge clk) begin
    if (rst) begin
      load_sync  <= '0;
      clear_sync <= '0;
      load_prev  <= 1'b0;
    end else begin
      load_sync  <= {load_sync[0], btn_load};
      clear_sync <= {clear_sync[0], btn_clear};
      load_prev  <= load_sync[1];
    end
  end

  assign load_pulse = load_sync[1] && !load_prev;
  assign clear_lvl  = clear_sync[1] || rst;

  // ---- operand registers, comparator and digit adders ----
  bcd_digit_t a_q   [NDIGITS];
  bcd_digit_t b_q   [NDIGITS];
  bcd_digit_t op_a  [NDIGITS];
  bcd_digit_t op_b  [NDIGITS];
  bcd_digit_t sum   [NDIGITS];
  cmp_t       cmp   [NDIGITS+1];
  logic       carry [NDIGITS+1];

  logic sub, swap, sign_out, overflow, result_zero;

  assign cmp[0]   = CMP_EQUAL;
  assign carry[0] = 1'b0;

  for (genvar i = 0; i < NDIGITS; i++) begin : g_digit
    regunit u_reg (
      .clk      (clk),
      .clear    (clear_lvl),
      .load_a   (load_pulse && !sw_absel),
      .load_b   (load_pulse &&  sw_absel),
      .a_in     (i == 0 ? sw_digit : a_q[i-1]),
      .b_in     (i == 0 ? sw_digit : b_q[i-1]),
      .a_q      (a_q[i]),
      .b_q      (b_q[i]),
      .swap     (swap),
      .show_reg (sw_showreg),
      .absel    (sw_absel),
      .op_a     (op_a[i]),
      .op_b     (op_b[i]),
      .cmp_in   (cmp[i]),
      .cmp_out  (cmp[i+1])
    );

    digitadd u_add (
      .a     (op_a[i]),
      .b     (op_b[i]),
      .cbin  (carry[i]),
      .sub   (sub),
      .s     (sum[i]),
      .cbout (carry[i+1])
    );
  end

  assign result_zero = (sum[0] == 4'd0) && (sum[1] == 4'd0) && (sum[2] == 4'd0);

  ctlunit u_ctl (
    .clk         (clk),
    .clear       (clear_lvl),
    .load        (load_pulse),
    .absel       (sw_absel),
    .sign_in     (sw_sign),
    .show_reg    (sw_showreg),
    .cmp         (cmp[NDIGITS]),
    .msd_carry   (carry[NDIGITS]),
    .result_zero (result_zero),
    .sign_a      (),
    .sign_b      (),
    .sub         (sub),
    .swap        (swap),
    .sign_out    (sign_out),
    .overflow    (overflow)
  );

  // ---- display ----
  ssctrl #(.DIV_BITS(DIV_BITS)) u_disp (
    .clk    (clk),
    .rst    (rst),
    .digits (sum),
    .neg    (sign_out),
    .an     (an),
    .seg    (seg),
    .dp     (dp)
  );

  assign led_overflow = overflow;

endmodule
