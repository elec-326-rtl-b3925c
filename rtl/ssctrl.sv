// ssctrl: multiplexing controller for a four-digit seven-segment display.
//
// The four digits share one set of cathode lines, so only one digit is lit at
// a time and the controller cycles through them fast enough for the eye to
// see all four. A free-running prescaler of DIV_BITS bits advances a 4-bit
// ring counter once per 2**DIV_BITS clock cycles; the ring counter drives the
// active-low anode enables an[3:0] directly (an[0] = rightmost digit) and
// also selects which code is sent through ssconv to the cathodes, so anodes
// and cathodes always change in the same cycle. Digits 0..2 show the units,
// tens and hundreds BCD digits; digit 3 shows a minus sign when neg = 1 and
// is blank otherwise. The decimal point dp is held off (high).
// rst puts the ring at the rightmost digit; a ring that is ever not one-hot
// is put back on the next step.
// Timing: each digit is lit for 2**DIV_BITS cycles; with the default 16 and a
// 50 MHz board clock that is 1.3 ms per digit, a 190 Hz refresh of the whole
// display. The anodes come straight from the ring register and the cathodes
// through ssconv from it, so both change in the cycle after a prescaler wrap.
// The ring-counter scan, the sign digit and the active-low anodes and
// cathodes follow the project specification and the board; the scan rate,
// scan order and the self-restarting ring are this design's choices.
module ssctrl
  import bcd_pkg::*;
#(
  parameter int unsigned DIV_BITS = 16
) (
  input  logic       clk,
  input  logic       rst,                 // synchronous, active high
  input  bcd_digit_t digits [NDIGITS],    // [0] = units
  input  logic       neg,                 // show a minus sign on digit 3
  output logic [3:0] an,                  // anode enables, active low
  output seg_t       seg,                 // cathodes {g,f,e,d,c,b,a}, active low
  output logic       dp                   // decimal point cathode, active low
);

  logic [DIV_BITS-1:0] presc;
  logic [3:0]          ring;      // one-hot, active high
  bcd_digit_t          code;
  logic                ring_ok;   // exactly one bit set

  assign ring_ok = (ring != 4'b0000) && ((ring & (ring - 4'd1)) == 4'b0000);

  always_ff @(posedge clk) begin
    if (rst) begin
      presc <= '0;
      ring  <= 4'b0001;
    end else begin
      presc <= presc + 1'b1;
      if (presc == '1) begin
        if (ring_ok) ring <= {ring[2:0], ring[3]};
        else               ring <= 4'b0001;
      end
    end
  end

  always_comb begin
    case (1'b1)
      ring[1]: code = digits[1];
      ring[2]: code = digits[2];
      ring[3]: code = neg ? CODE_MINUS : CODE_BLANK;
      default: code = digits[0];
    endcase
  end

  ssconv u_conv (.code(code), .seg(seg));

  assign an = ~ring;
  assign dp = 1'b1;

endmodule
