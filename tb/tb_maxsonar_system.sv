// tb_maxsonar_system: end-to-end test of the distance meter.
//
// Runs the whole main module with shortened timings (20-cycle centimetre,
// 20-cycle trigger, 8-cycle digit refresh, 20-cycle millisecond). The reading
// is taken from the scanned display itself: the segment patterns seen under
// each anode are decoded back to digits. Exercised and counted:
//   unitary measurements with the on-chip sensor model (emulate = 1),
//   unitary measurements with an external echo driven by the testbench,
//   continuous mode (several measurements with no button press),
//   switching between modes, a held button giving one measurement only,
//   distances clamped to the sensor range, and every alarm zone
//   (silent, far, mid, near, continuous) with its beep duty.
// A mechanism that never happened counts as a failure.
module tb_maxsonar_system;
  import maxsonar_pkg::*;
  localparam int unsigned CM  = 20;
  localparam int unsigned TRL = 20;
  localparam int unsigned REF = 8;
  localparam int unsigned TPM = 20;
  localparam int unsigned HALF = 4;

  logic       ck = 1'b0;
  logic       reset = 1'b1;
  logic       mode = 1'b0;
  logic       mide = 1'b0;
  logic       echo = 1'b0;
  logic       emulate = 1'b1;
  logic [8:0] emu_distance = '0;
  logic       trigger, data_valid, alarm;
  logic [3:0] an;
  logic [6:0] seg;
  int checks = 0, failures = 0;
  int trig_count = 0;
  int n_unitary = 0, n_external = 0, n_continuous = 0, n_mode_switch = 0;
  int n_held = 0, n_clamped = 0;
  int n_zone [5];

  always #5 ck = ~ck;

  maxsonar_system #(.CM_CYCLES(CM), .TRIG_LEN(TRL), .TRIG_MIN(TRL - 4), .REFRESH_CYCLES(REF),
                    .TICKS_PER_MS(TPM), .HALF_CYCLES(HALF)) dut (
    .ck(ck), .reset(reset), .mode(mode), .mide(mide), .echo(echo),
    .trigger(trigger), .data_valid(data_valid), .alarm(alarm),
    .an(an), .seg(seg), .emulate(emulate), .emu_distance(emu_distance));

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic trig_q = 1'b0;
  always @(posedge ck) begin
    trig_q <= trigger;
    if (trigger && !trig_q) trig_count++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s", what);
    end
  endtask

  // 7-segment pattern (active low, {g..a}) back to a digit, -1 if none
  function automatic int seg_digit(input logic [6:0] s);
    logic [6:0] table_lit [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66,
                                   7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};
    for (int v = 0; v < 10; v++) if (~s == table_lit[v]) return v;
    return -1;
  endfunction

  // watch one full scan of the display and return the number shown
  task automatic read_display(output int value);
    int dig [4];
    for (int k = 0; k < 4; k++) dig[k] = -1;
    repeat (4 * REF + 4) begin
      @(negedge ck);
      for (int k = 0; k < 4; k++) if (an == ~(4'b1 << k)) dig[k] = seg_digit(seg);
    end
    value = 0;
    for (int k = 3; k >= 0; k--) begin
      if (dig[k] < 0) begin
        value = -1;
        return;
      end
      value = value * 10 + dig[k];
    end
  endtask

  function automatic int clampd(input int d);
    return d < 2 ? 2 : (d > 400 ? 400 : d);
  endfunction

  task automatic wait_valid();
    int n;
    n = 0;
    while (!data_valid && n < 20000) begin
      @(negedge ck);
      n++;
    end
    check(data_valid, "no data_valid");
  endtask

  // watch the buzzer for one pattern period and check its duty
  task automatic check_alarm(input int d);
    int on_ms, per_ms, low, zone;
    if (d > 100)      begin on_ms = 0;    per_ms = 1000; zone = 0; end
    else if (d > 75)  begin on_ms = 100;  per_ms = 1000; zone = 1; end
    else if (d > 50)  begin on_ms = 200;  per_ms = 700;  zone = 2; end
    else if (d >= 10) begin on_ms = 200;  per_ms = 400;  zone = 3; end
    else              begin on_ms = 1000; per_ms = 1000; zone = 4; end
    low = 0;
    for (int c = 0; c < per_ms * TPM; c++) begin
      @(negedge ck);
      if (!alarm) low++;
    end
    // the pattern started a few cycles before the window opened
    checks++;
    if (low < on_ms * int'(TPM) - 40 || low > on_ms * int'(TPM)) begin
      failures++;
      $display("ERROR d=%0d: buzzer on %0d cycles, expected about %0d", d, low, on_ms * TPM);
    end else n_zone[zone]++;
  endtask

  // one press of mide in unitary mode
  task automatic press(input int hold);
    @(negedge ck) mide = 1'b1;
    repeat (hold) @(negedge ck);
    mide = 1'b0;
  endtask

  task automatic unitary_emulated(input int d, input bit alarm_too);
    int shown, t0;
    emulate = 1'b1;
    emu_distance = 9'(d);
    t0 = trig_count;
    press(5);
    repeat (10) @(negedge ck);
    check(!data_valid, "data_valid stayed high after a new start");
    wait_valid();
    read_display(shown);
    check(shown == clampd(d), $sformatf("d=%0d display shows %0d", d, shown));
    check(trig_count == t0 + 1, "one trigger per press");
    if (shown == clampd(d)) n_unitary++;
    if (d != clampd(d) && shown == clampd(d)) n_clamped++;
    if (alarm_too) check_alarm(clampd(d));
  endtask

  // external sensor: the testbench answers the trigger pin itself
  task automatic unitary_external(input int d);
    int shown;
    emulate = 1'b0;
    fork
      press(5);
      begin
        while (!trigger) @(negedge ck);
        while (trigger) @(negedge ck);
        repeat (37) @(negedge ck);
        echo = 1'b1;
        repeat (d * CM) @(negedge ck);
        echo = 1'b0;
      end
    join
    wait_valid();
    read_display(shown);
    check(shown == d, $sformatf("external d=%0d display shows %0d", d, shown));
    if (shown == d) n_external++;
    emulate = 1'b1;
  endtask

  initial begin
    int shown, t0, d;
    for (int z = 0; z < 5; z++) n_zone[z] = 0;
    repeat (3) @(posedge ck);
    @(negedge ck) reset = 1'b0;
    repeat (20) @(negedge ck);
    check(!data_valid && alarm && trig_count == 0, "idle after reset");
    read_display(shown);
    check(shown == 0, $sformatf("display after reset shows %0d", shown));

    // the two readings photographed on the board, then the alarm zones
    unitary_emulated(16, 1'b1);
    unitary_emulated(27, 1'b1);
    unitary_emulated(150, 1'b1);
    unitary_emulated(90, 1'b1);
    unitary_emulated(60, 1'b1);
    unitary_emulated(40, 1'b1);
    unitary_emulated(12, 1'b1);
    unitary_emulated(5, 1'b1);
    unitary_emulated(0, 1'b0);     // below range: reads 2
    unitary_emulated(450, 1'b0);   // beyond range: reads 400
    unitary_emulated(400, 1'b0);
    for (int i = 0; i < 5; i++) unitary_emulated($urandom_range(2, 400), 1'b0);

    unitary_external(123);
    unitary_external(7);

    // a long press is still one measurement
    t0 = trig_count;
    emu_distance = 9'd33;
    press(3000);
    wait_valid();
    repeat (200) @(negedge ck);
    check(trig_count == t0 + 1, "held button gave more than one measurement");
    if (trig_count == t0 + 1) n_held++;

    // continuous mode: measurements follow each other with no press
    mode = 1'b1;
    n_mode_switch++;
    for (int i = 0; i < 4; i++) begin
      d = $urandom_range(2, 120);
      emu_distance = 9'(d);
      t0 = trig_count;
      // the distance set now is used from the next trigger on
      while (trig_count == t0) @(negedge ck);
      while (!data_valid) @(negedge ck);
      @(negedge ck);
      t0 = trig_count;
      while (!data_valid) @(negedge ck);
      check(dut.distance == 9'(d), $sformatf("continuous d=%0d got %0d", d, dut.distance));
      read_display(shown);
      check(shown == d || shown == int'(dut.distance),
            $sformatf("continuous display %0d", shown));
      if (dut.distance == 9'(d)) n_continuous++;
    end
    mode = 1'b0;
    n_mode_switch++;
    repeat (10000) @(negedge ck);
    t0 = trig_count;
    repeat (10000) @(negedge ck);
    check(trig_count == t0, "measurements continue after leaving continuous mode");
    unitary_emulated(64, 1'b0);

    check(n_unitary > 0,     "no unitary measurement");
    check(n_external > 0,    "no external-echo measurement");
    check(n_continuous > 1,  "no continuous measurements");
    check(n_mode_switch > 1, "no mode switch");
    check(n_held > 0,        "no held-button test");
    check(n_clamped > 0,     "no clamped distance");
    for (int z = 0; z < 5; z++) check(n_zone[z] > 0, $sformatf("alarm zone %0d never seen", z));
    $display("mechanisms: unitary=%0d external=%0d continuous=%0d mode_switch=%0d held=%0d clamped=%0d zones=%0d/%0d/%0d/%0d/%0d",
             n_unitary, n_external, n_continuous, n_mode_switch, n_held, n_clamped,
             n_zone[0], n_zone[1], n_zone[2], n_zone[3], n_zone[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
