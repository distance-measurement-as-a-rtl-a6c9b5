// seg7_display4: four-digit BCD to 7-segment converter for the board display.
//
// The board's displays share one set of segment lines and have one common
// anode per digit, so the digits are shown one at a time in turn, fast enough
// that the eye sees all four lit. A counter of REFRESH_CYCLES clock cycles
// selects the next digit; the selected digit's BCD code is decoded by
// bcd_to_seg7 and its anode is switched on.
//
// Interface: bcd[0] is the rightmost digit. an[k] enables digit k and seg
// drives the segments {g,f,e,d,c,b,a}; both are active low, as on the board.
// All four digits are shown, leading zeros included (a reading of 16 cm shows
// as 0016).
//
// Timing: each digit is on for REFRESH_CYCLES cycles; the default 100000
// (1 ms at 100 MHz) refreshes the whole display at 250 Hz. an and seg are
// registered and change together.
//
// The four digits and the BCD/7-segment conversion follow the document; the
// scanning, its rate and the active-low polarity come from the board and are
// this design's choices.
module seg7_display4 #(
  parameter int unsigned REFRESH_CYCLES = 100_000,
  parameter int unsigned NDIG           = maxsonar_pkg::DIGITS
) (
  input  logic                 ck,
  input  logic                 reset,   // asynchronous, active high
  input  logic [NDIG-1:0][3:0] bcd,
  output logic [NDIG-1:0]      an,      // digit enables, active low
  output logic [6:0]           seg      // segments {g..a}, active low
);

  localparam int unsigned RW = (REFRESH_CYCLES > 1) ? $clog2(REFRESH_CYCLES) : 1;
  localparam int unsigned DW = (NDIG > 1) ? $clog2(NDIG) : 1;

  logic [RW-1:0] rcnt;
  logic [DW-1:0] digit;
  logic [6:0]    seg_on;

  bcd_to_seg7 u_dec (.bcd(bcd[digit]), .seg(seg_on));

  always_ff @(posedge ck or posedge reset) begin
    if (reset) begin
      rcnt  <= '0;
      digit <= '0;
    end else if (rcnt == RW'(REFRESH_CYCLES - 1)) begin
      rcnt  <= '0;
      digit <= (digit == DW'(NDIG - 1)) ? '0 : digit + 1'b1;
    end else begin
      rcnt  <= rcnt + 1'b1;
    end
  end

  always_ff @(posedge ck or posedge reset) begin
    if (reset) begin
      an  <= '1;
      seg <= '1;
    end else begin
      an  <= ~(NDIG'(1) << digit);
      seg <= ~seg_on;
    end
  end

endmodule
