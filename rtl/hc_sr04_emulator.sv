// hc_sr04_emulator: functional model of the HC-SR04 ultrasonic sensor.
//
// Lets the controller be simulated, or run on the board, without the real
// sensor. It behaves as the sensor's timing diagram describes: a trigger pulse
// of at least TRIG_MIN cycles (10 us) starts a measurement; when the trigger
// falls the transmitter sends a burst of BURST_PULSES square pulses at 40 kHz
// (shown on tx_burst); after the burst the echo output goes high for a time
// proportional to the distance, CM_CYCLES cycles per centimetre. A shorter
// trigger pulse is ignored, as is a trigger while a measurement runs.
//
// Interface: distance_cm is the distance to emulate, sampled when the trigger
// falls; it is clamped to the sensor's range MIN_CM..MAX_CM (2 cm to 4 m). A
// testbench drives it with random values to get randomly timed echoes.
//
// Timing: echo rises BURST_PULSES*2*HALF_CYCLES cycles after the trigger falls
// and stays high exactly d*CM_CYCLES cycles for the clamped distance d.
//
// The trigger minimum, the eight 40 kHz pulses, the 2 cm to 4 m range and the
// echo width proportional to distance follow the document; the echo starting
// right after the burst and the 58 us/cm factor are this design's choices
// (the latter from the sensor data sheet).
module hc_sr04_emulator
  import maxsonar_pkg::*;
#(
  parameter int unsigned DIST_WIDTH   = maxsonar_pkg::DIST_W,
  parameter int unsigned CM_CYCLES    = maxsonar_pkg::CYCLES_PER_CM,
  parameter int unsigned TRIG_MIN     = maxsonar_pkg::TRIG_MIN_CYCLES,
  parameter int unsigned HALF_CYCLES  = maxsonar_pkg::CLK_HZ / 80_000,  // 40 kHz
  parameter int unsigned BURST_PULSES = 8
) (
  input  logic                  ck,
  input  logic                  reset,        // asynchronous, active high
  input  logic                  trigger,
  input  logic [DIST_WIDTH-1:0] distance_cm,
  output logic                  echo,
  output logic                  tx_burst
);

  typedef enum logic [1:0] {E_IDLE, E_TRIG, E_BURST, E_ECHO} emu_state_t;

  localparam int unsigned ECHO_MAX = maxsonar_pkg::MAX_CM * CM_CYCLES;
  localparam int unsigned CW = $clog2(ECHO_MAX + 1) > $clog2(TRIG_MIN + 1)
                             ? $clog2(ECHO_MAX + 1) : $clog2(TRIG_MIN + 1);
  localparam int unsigned HW = (HALF_CYCLES > 1) ? $clog2(HALF_CYCLES) : 1;
  localparam int unsigned NW = $clog2(2 * BURST_PULSES + 1);

  emu_state_t            state;
  logic [CW-1:0]         cnt;
  logic [HW-1:0]         half_cnt;
  logic [NW-1:0]         halves;
  logic [DIST_WIDTH-1:0] d_clamped;
  logic [CW-1:0]         echo_len;

  always_comb begin
    if (32'(distance_cm) < MIN_CM)      d_clamped = DIST_WIDTH'(MIN_CM);
    else if (32'(distance_cm) > MAX_CM) d_clamped = DIST_WIDTH'(MAX_CM);
    else                                d_clamped = distance_cm;
  end

  always_ff @(posedge ck or posedge reset) begin
    if (reset) begin
      state    <= E_IDLE;
      cnt      <= '0;
      half_cnt <= '0;
      halves   <= '0;
      echo_len <= '0;
      echo     <= 1'b0;
      tx_burst <= 1'b0;
    end else begin
      unique case (state)
        E_IDLE: begin
          cnt <= CW'(1);
          if (trigger) state <= E_TRIG;
        end
        E_TRIG: begin
          if (trigger) begin
            if (cnt < CW'(TRIG_MIN)) cnt <= cnt + 1'b1;
          end else if (cnt >= CW'(TRIG_MIN)) begin
            state    <= E_BURST;
            echo_len <= CW'(32'(d_clamped) * CM_CYCLES);
            half_cnt <= '0;
            halves   <= '0;
            tx_burst <= 1'b1;
          end else begin
            state <= E_IDLE;
          end
        end
        E_BURST: begin
          if (half_cnt == HW'(HALF_CYCLES - 1)) begin
            half_cnt <= '0;
            halves   <= halves + 1'b1;
            if (halves == NW'(2 * BURST_PULSES - 1)) begin
              tx_burst <= 1'b0;
              echo     <= 1'b1;
              cnt      <= CW'(1);
              state    <= E_ECHO;
            end else begin
              tx_burst <= ~tx_burst;
            end
          end else begin
            half_cnt <= half_cnt + 1'b1;
          end
        end
        E_ECHO: begin
          if (cnt == echo_len) begin
            echo  <= 1'b0;
            state <= E_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  // The echo never overlaps the transmitter burst.
  a_no_overlap: assert property (@(posedge ck) disable iff (reset) !(echo && tx_burst));

endmodule
