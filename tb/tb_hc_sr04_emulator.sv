// tb_hc_sr04_emulator: self-checking test of the sensor model.
//
// With short burst half-periods and a 10-cycle centimetre, random distances
// (some outside the 2..400 cm range) are set and triggers of random length are
// sent. A trigger shorter than TRIG_MIN must give no burst and no echo. A valid
// one must give exactly 8 burst pulses, an echo rising 16 half-periods after
// the trigger falls, and an echo width of clamp(d, 2, 400) * CM cycles.
module tb_hc_sr04_emulator;
  localparam int unsigned CM    = 10;
  localparam int unsigned HALF  = 5;
  localparam int unsigned TMIN  = 20;

  logic       ck = 1'b0;
  logic       reset = 1'b1;
  logic       trigger = 1'b0;
  logic [8:0] distance_cm = '0;
  logic       echo, tx_burst;
  int checks = 0, failures = 0;

  always #5 ck = ~ck;

  hc_sr04_emulator #(.CM_CYCLES(CM), .TRIG_MIN(TMIN), .HALF_CYCLES(HALF)) dut (
    .ck(ck), .reset(reset), .trigger(trigger), .distance_cm(distance_cm),
    .echo(echo), .tx_burst(tx_burst));

  initial begin
    #100_000_000;
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

  task automatic shot(input int d, input int tlen);
    int exp_w, pulses, delay, w;
    bit prev_tx;
    exp_w = (d < 2 ? 2 : (d > 400 ? 400 : d)) * CM;
    @(negedge ck);
    distance_cm = 9'(d);
    trigger = 1'b1;
    repeat (tlen) @(negedge ck);
    trigger = 1'b0;
    pulses = 0;
    delay = 0;
    prev_tx = 1'b0;
    while (!echo && delay < 40 * HALF) begin
      @(negedge ck);
      delay++;
      if (tx_burst && !prev_tx) pulses++;
      prev_tx = tx_burst;
    end
    if (tlen < TMIN) begin
      check(!echo && pulses == 0, $sformatf("trigger of %0d cycles answered", tlen));
      return;
    end
    check(pulses == 8, $sformatf("%0d burst pulses", pulses));
    check(delay == 16 * HALF + 1, $sformatf("echo delay %0d", delay));
    w = 0;
    while (echo) begin
      @(negedge ck);
      w++;
    end
    check(w == exp_w, $sformatf("d=%0d echo width %0d expected %0d", d, w, exp_w));
    repeat ($urandom_range(1, 10)) @(negedge ck);
  endtask

  initial begin
    repeat (3) @(posedge ck);
    @(negedge ck) reset = 1'b0;
    shot(16, TMIN);
    shot(27, TMIN + 5);
    shot(0, TMIN);
    shot(1, TMIN);
    shot(400, TMIN);
    shot(511, TMIN);
    shot(100, TMIN - 1);
    shot(100, 3);
    for (int i = 0; i < 30; i++) shot($urandom_range(0, 511), $urandom_range(TMIN - 5, TMIN + 30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
