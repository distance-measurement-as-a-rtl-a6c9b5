// maxsonar_system: ultrasonic distance meter, main module.
//
// Measures the distance to an obstacle with an HC-SR04 sensor and shows it in
// centimetres on four 7-segment digits, with a proximity alarm on a buzzer.
//   start_mux        turns the mode switch and the mide button into start
//   control_maxsonar sends the trigger pulse and times the echo in cm
//   bin2bcd          9-bit distance -> four BCD digits
//   seg7_display4    BCD digits -> scanned 7-segment display
//   alarm_gen        distance -> beep pattern on the active-low buzzer
//   hc_sr04_emulator on-chip sensor model, used when emulate = 1
//
// Interface: ck is the 100 MHz board clock, reset is asynchronous and active
// high. mode = 1 measures continuously, mode = 0 measures once per press of
// mide. trigger and echo go to the sensor. data_valid is high while the
// display holds a completed measurement and no new one has been started
// (in continuous mode, a short pulse after each measurement). an and seg drive
// the display (active low); alarm drives the buzzer (0 = sounding).
// With emulate = 1 the controller's echo comes from the emulator instead of
// the echo pin, and emu_distance sets the distance it reports; the trigger pin
// still pulses.
//
// Timing: one measurement takes the 12 us trigger, the sensor's burst and
// 58 us of echo per centimetre; the display and alarm follow the new distance
// a few cycles after data_valid rises.
//
// The blocks and their connections follow the document's block diagrams. The
// emulate input, which keeps the sensor model available on the board, is this
// design's choice; the document swaps the model for the real sensor by editing
// the design.
module maxsonar_system
  import maxsonar_pkg::*;
#(
  parameter int unsigned CM_CYCLES      = maxsonar_pkg::CYCLES_PER_CM,
  parameter int unsigned TRIG_LEN       = maxsonar_pkg::TRIG_CYCLES,
  parameter int unsigned TRIG_MIN       = maxsonar_pkg::TRIG_MIN_CYCLES,
  parameter int unsigned REFRESH_CYCLES = 100_000,
  parameter int unsigned TICKS_PER_MS   = 100_000,
  parameter int unsigned HALF_CYCLES    = maxsonar_pkg::CLK_HZ / 80_000
) (
  input  logic              ck,
  input  logic              reset,
  input  logic              mode,
  input  logic              mide,
  input  logic              echo,
  output logic              trigger,
  output logic              data_valid,
  output logic              alarm,
  output logic [DIGITS-1:0] an,
  output logic [6:0]        seg,
  input  logic              emulate,
  input  logic [DIST_W-1:0] emu_distance
);

  logic                     start;
  logic                     echo_emu;
  logic                     echo_sel;
  logic                     tx_unused;
  logic [DIST_W-1:0]        distance;
  logic [DIGITS-1:0][3:0]   bcd;

  start_mux u_mux (
    .ck    (ck),
    .reset (reset),
    .mode  (mode),
    .mide  (mide),
    .start (start)
  );

  assign echo_sel = emulate ? echo_emu : echo;

  control_maxsonar #(
    .DIST_WIDTH (DIST_W),
    .TRIG_LEN   (TRIG_LEN),
    .CM_CYCLES  (CM_CYCLES)
  ) u_ctrl (
    .ck         (ck),
    .reset      (reset),
    .start      (start),
    .echo       (echo_sel),
    .trigger    (trigger),
    .distance   (distance),
    .data_valid (data_valid)
  );

  hc_sr04_emulator #(
    .DIST_WIDTH  (DIST_W),
    .CM_CYCLES   (CM_CYCLES),
    .TRIG_MIN    (TRIG_MIN),
    .HALF_CYCLES (HALF_CYCLES)
  ) u_emu (
    .ck          (ck),
    .reset       (reset),
    .trigger     (trigger),
    .distance_cm (emu_distance),
    .echo        (echo_emu),
    .tx_burst    (tx_unused)
  );

  bin2bcd #(.BIN_W(DIST_W), .NDIG(DIGITS)) u_bcd (
    .bin (distance),
    .bcd (bcd)
  );

  seg7_display4 #(.REFRESH_CYCLES(REFRESH_CYCLES), .NDIG(DIGITS)) u_disp (
    .ck    (ck),
    .reset (reset),
    .bcd   (bcd),
    .an    (an),
    .seg   (seg)
  );

  alarm_gen #(.DIST_WIDTH(DIST_W), .TICKS_PER_MS(TICKS_PER_MS)) u_alarm (
    .ck         (ck),
    .reset      (reset),
    .distance   (distance),
    .data_valid (data_valid),
    .alarm      (alarm)
  );

endmodule
