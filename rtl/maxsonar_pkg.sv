// maxsonar_pkg: constants and types shared by the ultrasonic distance meter.
//
// The board clock is 100 MHz and the HC-SR04 sensor covers 2 cm to 4 m, so the
// measured distance needs 9 bits (400 < 512). One centimetre of distance is
// 58 us of echo time (sound travels there and back at about 343 m/s), which is
// 5800 cycles of the 100 MHz clock. The trigger pulse must be longer than
// 10 us; 12 us (1200 cycles) is used to keep a margin.
// The clock rate, the 4 m range and the 10 us trigger minimum follow the
// document; the 58 us/cm factor comes from the sensor's data sheet and the 12 us
// trigger length is this design's choice.
package maxsonar_pkg;

  localparam int unsigned CLK_HZ          = 100_000_000;
  localparam int unsigned MAX_CM          = 400;   // upper end of the sensor range
  localparam int unsigned MIN_CM          = 2;     // lower end of the sensor range
  localparam int unsigned DIST_W          = 9;     // bits needed for 0..400
  localparam int unsigned CYCLES_PER_CM   = 5800;  // 58 us at 100 MHz
  localparam int unsigned TRIG_CYCLES     = 1200;  // 12 us trigger pulse
  localparam int unsigned TRIG_MIN_CYCLES = 1000;  // 10 us, sensor minimum
  localparam int unsigned DIGITS          = 4;     // 7-segment digits shown

  // States of the measurement controller.
  typedef enum logic [1:0] {
    S_IDLE,       // waiting for start; last result held
    S_TRIGGER,    // trigger output high
    S_WAIT_ECHO,  // trigger done, echo not yet high
    S_MEASURE     // echo high, counting centimetre ticks
  } ctrl_state_t;

  // Beep zones of the proximity alarm.
  typedef enum logic [2:0] {
    Z_OFF,        // no measurement yet, or farther than 100 cm
    Z_FAR,        // 75 cm < d <= 100 cm: short, widely spaced beeps
    Z_MID,        // 50 cm < d <= 75 cm : longer, closer beeps
    Z_NEAR,       // 10 cm <= d <= 50 cm: closer still
    Z_CONT        // d < 10 cm          : continuous tone
  } alarm_zone_t;

endpackage
