// control_maxsonar: measurement controller for the HC-SR04 ultrasonic sensor.
//
// On start it drives a trigger pulse of TRIG_CYCLES clock cycles, waits for the
// sensor's echo to go high and counts, with the centimetre divider
// cm_tick_gen, how many centimetre periods the echo stays high. When the echo
// falls the count is stored in distance and data_valid is raised.
//
// State machine (maxsonar_pkg::ctrl_state_t):
//   S_IDLE      -> S_TRIGGER   when start is high (data_valid drops)
//   S_TRIGGER   -> S_WAIT_ECHO after TRIG_CYCLES cycles with trigger high
//   S_WAIT_ECHO -> S_MEASURE   when the (synchronised) echo is high
//   S_MEASURE   -> S_IDLE      when the echo is low; distance and data_valid set
// start is a level: held high (continuous mode) it starts a new measurement
// as soon as the previous one ends; a one-cycle pulse starts one measurement.
// start is ignored while a measurement runs.
//
// Timing: echo passes a two-flop synchroniser. An echo pulse of W cycles gives
// distance = floor(W / CYCLES_PER_CM), saturated at 2**DIST_W-1. distance keeps
// the last result until the next measurement ends, so a display fed from it
// always shows a complete measurement. data_valid is high from the end of a
// measurement until the next start is accepted.
//
// Two assertions check that data_valid is only high in S_IDLE and that each
// trigger pulse has its full length.
//
// The ports, the trigger minimum of 10 us, the 1 cm resolution, the 9-bit
// distance for a 4 m limit, the asynchronous reset and the use of a state
// machine follow the document. The synchroniser, the saturation, the level
// meaning of start and the data_valid timing are this design's choices.
module control_maxsonar
  import maxsonar_pkg::*;
#(
  parameter int unsigned DIST_WIDTH    = maxsonar_pkg::DIST_W,
  parameter int unsigned TRIG_LEN      = maxsonar_pkg::TRIG_CYCLES,
  parameter int unsigned CM_CYCLES     = maxsonar_pkg::CYCLES_PER_CM
) (
  input  logic                  ck,
  input  logic                  reset,       // asynchronous, active high
  input  logic                  start,
  input  logic                  echo,        // from the sensor, asynchronous
  output logic                  trigger,
  output logic [DIST_WIDTH-1:0] distance,
  output logic                  data_valid
);

  localparam int unsigned TW = (TRIG_LEN > 1) ? $clog2(TRIG_LEN) : 1;
  localparam logic [DIST_WIDTH-1:0] DMAX = '1;

  ctrl_state_t           state;
  logic [1:0]            echo_sync;
  logic                  echo_s;
  logic [TW-1:0]         trig_cnt;
  logic [DIST_WIDTH-1:0] cm_cnt;
  logic [DIST_WIDTH-1:0] cm_next;
  logic                  tick;

  assign echo_s = echo_sync[1];

  // Centimetre divider: held cleared outside the counting state, so the first
  // tick falls exactly one centimetre period after the echo was seen high.
  cm_tick_gen #(.DIV(CM_CYCLES)) u_div (
    .ck    (ck),
    .reset (reset),
    .clear (state != S_MEASURE),
    .tick  (tick)
  );

  always_comb begin
    cm_next = cm_cnt;
    if (tick && cm_cnt != DMAX) cm_next = cm_cnt + 1'b1;
  end

  always_ff @(posedge ck or posedge reset) begin
    if (reset) echo_sync <= '0;
    else       echo_sync <= {echo_sync[0], echo};
  end

  always_ff @(posedge ck or posedge reset) begin
    if (reset) begin
      state      <= S_IDLE;
      trig_cnt   <= '0;
      cm_cnt     <= '0;
      distance   <= '0;
      data_valid <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          trig_cnt <= '0;
          if (start) begin
            state      <= S_TRIGGER;
            data_valid <= 1'b0;
          end
        end
        S_TRIGGER: begin
          if (trig_cnt == TW'(TRIG_LEN - 1)) state <= S_WAIT_ECHO;
          else                               trig_cnt <= trig_cnt + 1'b1;
        end
        S_WAIT_ECHO: begin
          cm_cnt <= '0;
          if (echo_s) state <= S_MEASURE;
        end
        S_MEASURE: begin
          cm_cnt <= cm_next;
          if (!echo_s) begin
            distance   <= cm_next;
            data_valid <= 1'b1;
            state      <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign trigger = (state == S_TRIGGER);

  // Protocol rules: a result is never flagged while the sensor is being
  // triggered or timed, and every trigger pulse lasts TRIG_LEN cycles.
  a_valid_idle: assert property (@(posedge ck) disable iff (reset)
    data_valid |-> state == S_IDLE);
  a_trig_len: assert property (@(posedge ck) disable iff (reset)
    $fell(trigger) |-> trig_cnt == TW'(TRIG_LEN - 1));

endmodule
