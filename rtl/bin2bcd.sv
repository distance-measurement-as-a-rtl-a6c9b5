// bin2bcd: binary to BCD converter for the distance display.
//
// Converts an unsigned BIN_W-bit number into NDIG BCD digits with the
// shift-and-add-3 ("double dabble") method: the binary bits are shifted in
// from the top, and before each shift every BCD digit of 5 or more gets 3
// added so that it carries correctly into the next digit. The loop is fully
// unrolled, so the block is purely combinational.
//
// Interface: bcd[0] is the units digit, bcd[NDIG-1] the most significant.
// Numbers that do not fit in NDIG digits keep only their low NDIG digits.
// With the default 9-bit input (at most 511) the thousands digit and the top
// bits of the hundreds digit are always zero; they are kept so the output
// matches the four-digit display.
//
// The document asks for a binary/BCD converter between the 9-bit distance and
// the four-digit BCD/7-segment converter; the method is this design's choice.
module bin2bcd #(
  parameter int unsigned BIN_W = maxsonar_pkg::DIST_W,
  parameter int unsigned NDIG  = maxsonar_pkg::DIGITS
) (
  input  logic [BIN_W-1:0]        bin,
  output logic [NDIG-1:0][3:0]    bcd
);

  always_comb begin
    logic [4*NDIG-1:0] acc;
    acc = '0;
    for (int i = BIN_W - 1; i >= 0; i--) begin
      for (int d = 0; d < NDIG; d++) begin
        if (acc[4*d +: 4] >= 4'd5) acc[4*d +: 4] = acc[4*d +: 4] + 4'd3;
      end
      acc = {acc[4*NDIG-2:0], bin[i]};
    end
    bcd = acc;
  end

endmodule
