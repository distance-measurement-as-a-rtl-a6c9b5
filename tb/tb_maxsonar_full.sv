// tb_maxsonar_full: the distance meter at its real timings (100 MHz clock).
//
// The main module runs with every parameter at its default and the on-chip
// sensor model. Two single measurements are made, at 16 cm and at 27 cm. For
// each the testbench checks the trigger width (12 us, above the sensor's
// 10 us minimum), the time from trigger to data_valid (burst of 8 pulses at
// 40 kHz = 200 us, then 58 us per cm), the four digits read back from the
// scanned display (1 ms per digit) and the length of the first beep of the
// alarm (200 ms in the 10..50 cm zone; the second reading is in the same
// zone, so the pattern must carry on in its gap).
module tb_maxsonar_full;
  logic       ck = 1'b0;
  logic       reset = 1'b1;
  logic       mode = 1'b0;
  logic       mide = 1'b0;
  logic       emulate = 1'b1;
  logic [8:0] emu_distance = '0;
  logic       trigger, data_valid, alarm;
  logic [3:0] an;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  always #5 ck = ~ck;   // 100 MHz

  maxsonar_system dut (
    .ck(ck), .reset(reset), .mode(mode), .mide(mide), .echo(1'b0),
    .trigger(trigger), .data_valid(data_valid), .alarm(alarm),
    .an(an), .seg(seg), .emulate(emulate), .emu_distance(emu_distance));

  initial begin
    #1_000_000_000;   // 1 s
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s", what);
    end
  endtask

  function automatic int seg_digit(input logic [6:0] s);
    logic [6:0] table_lit [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66,
                                   7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};
    for (int v = 0; v < 10; v++) if (~s == table_lit[v]) return v;
    return -1;
  endfunction

  task automatic measure(input int d, input bit new_zone);
    int tw, lat, shown, beep;
    int dig [4];
    emu_distance = 9'(d);
    @(negedge ck) mide = 1'b1;
    while (!trigger) @(negedge ck);
    mide = 1'b0;
    tw = 0;
    while (trigger) begin
      tw++;
      @(negedge ck);
    end
    check(tw == 1200, $sformatf("trigger %0d cycles, expected 1200 (12 us)", tw));
    lat = 0;
    while (!data_valid && lat < 5_000_000) begin
      lat++;
      @(negedge ck);
    end
    // 200 us burst + d * 58 us echo + synchroniser and state delays
    check(lat >= 20_000 + d * 5800 && lat <= 20_000 + d * 5800 + 10,
          $sformatf("trigger to data_valid %0d cycles for %0d cm", lat, d));
    for (int k = 0; k < 4; k++) dig[k] = -1;
    repeat (410_000) begin
      @(negedge ck);
      for (int k = 0; k < 4; k++) if (an == ~(4'b1 << k)) dig[k] = seg_digit(seg);
    end
    shown = 0;
    for (int k = 3; k >= 0; k--) shown = (dig[k] < 0) ? -100000 : shown * 10 + dig[k];
    check(shown == d, $sformatf("display shows %0d, expected %0d", shown, d));
    $display("display %0d%0d%0d%0d", dig[3], dig[2], dig[1], dig[0]);
    if (!new_zone) begin
      // same zone as before: the pattern goes on, here in its 200 ms gap
      check(alarm, "beep pattern restarted without a zone change");
      return;
    end
    // the first beep began with the new zone; measure what remains of it
    beep = 410_000 + 2;
    while (!alarm) begin
      beep++;
      @(negedge ck);
    end
    check(beep > 19_999_000 && beep < 20_001_000,
          $sformatf("first beep %0d cycles, expected 20000000 (200 ms)", beep));
  endtask

  initial begin
    repeat (5) @(posedge ck);
    @(negedge ck) reset = 1'b0;
    repeat (100) @(negedge ck);
    check(alarm && !data_valid, "idle after reset");
    measure(16, 1'b1);
    // wait out the gap of the pattern, then measure again
    repeat (1000) @(negedge ck);
    measure(27, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
