// alarm_gen: proximity alarm for an active-low buzzer.
//
// The last valid distance picks one of five zones, and each zone has its own
// beep pattern. A beep pattern is a period of ON_MS + OFF_MS milliseconds
// whose first ON_MS milliseconds sound the buzzer:
//   d > 100 cm (or no measurement yet)  silent
//   75 < d <= 100 cm                    FAR : short beeps, long gaps
//   50 < d <=  75 cm                    MID : longer beeps, shorter gaps
//   10 <= d <= 50 cm                    NEAR: gaps shorter still
//   d < 10 cm                           continuous tone
// When the zone changes the pattern restarts with a beep, so that moving
// closer is heard at once.
//
// Interface: distance is sampled in every cycle data_valid is high. alarm
// drives the buzzer and is active low: 1 = silent, 0 = sounding.
//
// Timing: a prescaler of TICKS_PER_MS cycles makes a millisecond tick (100000
// at 100 MHz). alarm is registered; it follows a new zone two cycles after
// data_valid.
//
// The zone limits at 100, 75, 50 and 10 cm, the continuous tone below 10 cm and
// the active-low buzzer follow the document. The document gives no band for
// 10 to 25 cm; this design extends the 25-50 cm pattern down to 10 cm. The
// beep and gap lengths are this design's choices, as is the silence above
// 100 cm.
module alarm_gen
  import maxsonar_pkg::*;
#(
  parameter int unsigned DIST_WIDTH   = maxsonar_pkg::DIST_W,
  parameter int unsigned TICKS_PER_MS = 100_000,
  parameter int unsigned FAR_CM       = 100,
  parameter int unsigned MID_CM       = 75,
  parameter int unsigned NEAR_CM      = 50,
  parameter int unsigned CONT_CM      = 10,
  parameter int unsigned FAR_ON_MS    = 100,
  parameter int unsigned FAR_OFF_MS   = 900,
  parameter int unsigned MID_ON_MS    = 200,
  parameter int unsigned MID_OFF_MS   = 500,
  parameter int unsigned NEAR_ON_MS   = 200,
  parameter int unsigned NEAR_OFF_MS  = 200
) (
  input  logic                  ck,
  input  logic                  reset,      // asynchronous, active high
  input  logic [DIST_WIDTH-1:0] distance,
  input  logic                  data_valid,
  output logic                  alarm       // 0 = buzzer on
);

  localparam int unsigned PW = (TICKS_PER_MS > 1) ? $clog2(TICKS_PER_MS) : 1;
  localparam int unsigned MW = 16;          // milliseconds within a period

  logic [DIST_WIDTH-1:0] dist_q;
  logic                  have;
  alarm_zone_t           zone, zone_q;
  logic [PW-1:0]         pre;
  logic                  ms_tick;
  logic [MW-1:0]         ms_pos;
  logic [MW-1:0]         on_ms, period_ms;
  logic                  buzz;

  // Last valid measurement.
  always_ff @(posedge ck or posedge reset) begin
    if (reset) begin
      dist_q <= '0;
      have   <= 1'b0;
    end else if (data_valid) begin
      dist_q <= distance;
      have   <= 1'b1;
    end
  end

  always_comb begin
    if (!have)                                 zone = Z_OFF;
    else if (32'(dist_q) < CONT_CM)            zone = Z_CONT;
    else if (32'(dist_q) <= NEAR_CM)           zone = Z_NEAR;
    else if (32'(dist_q) <= MID_CM)            zone = Z_MID;
    else if (32'(dist_q) <= FAR_CM)            zone = Z_FAR;
    else                                       zone = Z_OFF;
  end

  always_comb begin
    unique case (zone_q)
      Z_FAR:   begin on_ms = MW'(FAR_ON_MS);  period_ms = MW'(FAR_ON_MS + FAR_OFF_MS);   end
      Z_MID:   begin on_ms = MW'(MID_ON_MS);  period_ms = MW'(MID_ON_MS + MID_OFF_MS);   end
      Z_NEAR:  begin on_ms = MW'(NEAR_ON_MS); period_ms = MW'(NEAR_ON_MS + NEAR_OFF_MS); end
      default: begin on_ms = '0;              period_ms = MW'(1);                         end
    endcase
  end

  assign ms_tick = (pre == PW'(TICKS_PER_MS - 1));

  always_ff @(posedge ck or posedge reset) begin
    if (reset) begin
      zone_q <= Z_OFF;
      pre    <= '0;
      ms_pos <= '0;
    end else begin
      zone_q <= zone;
      if (zone != zone_q) begin
        pre    <= '0;
        ms_pos <= '0;
      end else begin
        pre <= ms_tick ? '0 : pre + 1'b1;
        if (ms_tick) ms_pos <= (ms_pos == period_ms - 1'b1) ? '0 : ms_pos + 1'b1;
      end
    end
  end

  always_comb begin
    unique case (zone_q)
      Z_CONT:               buzz = 1'b1;
      Z_FAR, Z_MID, Z_NEAR: buzz = (ms_pos < on_ms);
      default:              buzz = 1'b0;
    endcase
  end

  always_ff @(posedge ck or posedge reset) begin
    if (reset) alarm <= 1'b1;
    else       alarm <= ~buzz;
  end

endmodule
