// ssconv: seven-segment code converter.
//
// Turns a 4-bit code into the seven cathode signals of one digit of a
// common-anode seven-segment display. Codes 0..9 show the decimal digit;
// code 10 (CODE_MINUS in bcd_pkg) lights only the middle segment g and is
// used for a negative sign; every other code (11..15, CODE_BLANK among them)
// lights nothing. Outputs are active low (0 lights a segment), in the order
// {g,f,e,d,c,b,a}. Purely combinational.
// Using a non-BCD code for the sign follows the project specification; the
// choice of code 10 and the bit order are this design's.
module ssconv
  import bcd_pkg::*;
(
  input  bcd_digit_t code,
  output seg_t       seg     // {g,f,e,d,c,b,a}, active low
);

  always_comb begin
    unique case (code)
      4'd0:       seg = 7'b100_0000;
      4'd1:       seg = 7'b111_1001;
      4'd2:       seg = 7'b010_0100;
      4'd3:       seg = 7'b011_0000;
      4'd4:       seg = 7'b001_1001;
      4'd5:       seg = 7'b001_0010;
      4'd6:       seg = 7'b000_0010;
      4'd7:       seg = 7'b111_1000;
      4'd8:       seg = 7'b000_0000;
      4'd9:       seg = 7'b001_0000;
      CODE_MINUS: seg = SEG_MINUS;
      default:    seg = SEG_OFF;
    endcase
  end

endmodule
