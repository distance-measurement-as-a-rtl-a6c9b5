// bcd_to_seg7: one-digit BCD to 7-segment decoder.
//
// Combinational. seg[0] is segment a, seg[1] b, ... seg[6] g, active high
// (1 = segment lit). Codes 10..15 are not BCD and give a blank digit.
// The segment pattern is the usual one for decimal digits; the blank for
// non-BCD codes is this design's choice.
module bcd_to_seg7 (
  input  logic [3:0] bcd,
  output logic [6:0] seg      // {g,f,e,d,c,b,a}, 1 = lit
);

  always_comb begin
    unique case (bcd)
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

endmodule
