// cm_tick_gen: clock divider that marks each centimetre of echo time.
//
// The controller counts how many centimetre periods the echo pulse lasts. This
// block divides the system clock by DIV and gives a one-cycle enable pulse,
// tick, every DIV cycles. It is used as a clock enable rather than as a
// derived clock, so the whole design stays on the one board clock.
//
// Interface: clear (synchronous) restarts the count; the first tick then comes
// DIV cycles after the cycle in which clear was high, i.e. in the DIV-th cycle
// with clear low. reset is asynchronous, active high.
//
// The document divides the clock with a vendor clocking block to get a 1 cm
// resolution; a plain counter doing the same division is this design's choice,
// and the division factor DIV = 5800 (58 us at 100 MHz) comes from the sensor
// data sheet.
module cm_tick_gen #(
  parameter int unsigned DIV = maxsonar_pkg::CYCLES_PER_CM
) (
  input  logic ck,
  input  logic reset,
  input  logic clear,
  output logic tick
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  assign tick = (cnt == CW'(DIV - 1));

  always_ff @(posedge ck or posedge reset) begin
    if (reset)          cnt <= '0;
    else if (clear)     cnt <= '0;
    else if (tick)      cnt <= '0;
    else                cnt <= cnt + 1'b1;
  end

endmodule
