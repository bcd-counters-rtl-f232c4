// seg7_decode: BCD digit to 7-segment pattern, purely combinational.
//
// Output bit order is {g,f,e,d,c,b,a} (bit 0 = segment a) and a 1 lights the
// segment. Segments are named the usual way: a top, b upper right, c lower
// right, d bottom, e lower left, f upper left, g middle. 6 and 9 are drawn
// with their tails (a on 6, d on 9). The codes 10..15 never occur in a BCD
// digit; they give a blank digit. The lab only says the count is shown as
// decimal digits; the patterns are the common ones.
module seg7_decode
  import bcd_pkg::*;
(
  input  bcd_t  digit,
  output seg7_t seg
);

  always_comb begin
    unique case (digit)
      4'd0:    seg = 7'b011_1111;
      4'd1:    seg = 7'b000_0110;
      4'd2:    seg = 7'b101_1011;
      4'd3:    seg = 7'b100_1111;
      4'd4:    seg = 7'b110_0110;
      4'd5:    seg = 7'b110_1101;
      4'd6:    seg = 7'b111_1101;
      4'd7:    seg = 7'b000_0111;
      4'd8:    seg = 7'b111_1111;
      4'd9:    seg = 7'b110_1111;
      default: seg = 7'b000_0000;
    endcase
  end

endmodule : seg7_decode
