// start_mux: chooses what starts a distance measurement.
//
// The meter has two operating modes, selected by the mode switch:
//   mode = 1  continuous: start is held high, so the controller measures
//             again as soon as each measurement ends;
//   mode = 0  unitary: one measurement per press of the mide button. mide
//             passes a two-flop synchroniser and its rising edge gives a
//             single one-cycle start pulse.
// Holding mide down in unitary mode therefore gives one measurement, not a
// stream of them.
//
// Timing: the start pulse comes three clock edges after mide rises; start
// follows a change of mode after the same delay. reset is asynchronous.
//
// The two modes and the mux between mode and mide follow the document; the
// mode encoding, the synchroniser and the edge detection are this design's
// choices (the document calls the block simply a multiplexer).
module start_mux (
  input  logic ck,
  input  logic reset,     // asynchronous, active high
  input  logic mode,      // 1 = continuous, 0 = unitary
  input  logic mide,      // measure button, used in unitary mode
  output logic start
);

  logic [2:0] mide_sync;   // [0],[1] synchroniser, [2] previous value
  logic [1:0] mode_sync;

  always_ff @(posedge ck or posedge reset) begin
    if (reset) begin
      mide_sync <= '0;
      mode_sync <= '0;
    end else begin
      mide_sync <= {mide_sync[1:0], mide};
      mode_sync <= {mode_sync[0], mode};
    end
  end

  always_ff @(posedge ck or posedge reset) begin
    if (reset) start <= 1'b0;
    else if (mode_sync[1]) start <= 1'b1;
    else start <= mide_sync[1] & ~mide_sync[2];
  end

endmodule
