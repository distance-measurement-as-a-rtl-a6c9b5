// tb_control_maxsonar: self-checking test of the measurement controller.
//
// The testbench plays the sensor: it checks the width of each trigger pulse,
// waits a random time, then holds echo high for a random number of cycles W.
// The expected distance is floor(W / CM_CYCLES), saturated at 511. It also
// checks that data_valid is low while a measurement runs, that a start
// pulse during a measurement is ignored, and that start held high gives
// back-to-back measurements. Small divider and trigger lengths keep it fast.
module tb_control_maxsonar;
  localparam int unsigned CM  = 10;
  localparam int unsigned TRL = 20;

  logic       ck = 1'b0;
  logic       reset = 1'b1;
  logic       start = 1'b0;
  logic       echo = 1'b0;
  logic       trigger, data_valid;
  logic [8:0] distance;
  int checks = 0, failures = 0;
  int trig_pulses = 0;

  always #5 ck = ~ck;

  control_maxsonar #(.TRIG_LEN(TRL), .CM_CYCLES(CM)) dut (
    .ck(ck), .reset(reset), .start(start), .echo(echo),
    .trigger(trigger), .distance(distance), .data_valid(data_valid));

  initial begin
    #20_000_000;
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

  // Answer one trigger with an echo of w cycles; return trigger width.
  task automatic sensor(input int w, input bit poke_start);
    int tw;
    tw = 0;
    while (!trigger) @(negedge ck);
    while (trigger) begin
      tw++;
      @(negedge ck);
    end
    trig_pulses++;
    check(tw == TRL, $sformatf("trigger width %0d, expected %0d", tw, TRL));
    repeat ($urandom_range(2, 30)) @(negedge ck);
    check(!data_valid, "data_valid high during a measurement");
    echo = 1'b1;
    repeat (w) @(negedge ck);
    if (poke_start) start = 1'b0;
    echo = 1'b0;
  endtask

  task automatic one_measure(input int w);
    int exp_d;
    exp_d = w / CM;
    if (exp_d > 511) exp_d = 511;
    @(negedge ck) start = 1'b1;
    @(negedge ck) start = 1'b0;
    fork
      sensor(w, 1'b0);
      begin
        // a start pulse in the middle of the measurement must be ignored
        repeat (TRL + 3) @(negedge ck);
        start = 1'b1;
        @(negedge ck) start = 1'b0;
      end
    join
    while (!data_valid) @(negedge ck);
    check(distance == 9'(exp_d),
          $sformatf("W=%0d distance %0d, expected %0d", w, distance, exp_d));
    repeat (50) @(posedge ck);
    check(!trigger && data_valid, "controller restarted without a start");
  endtask

  initial begin
    int w;
    int n_before;
    repeat (3) @(posedge ck);
    reset <= 1'b0;
    repeat (3) @(posedge ck);
    check(!data_valid && distance == 0 && !trigger, "reset values");
    // exact multiples and their neighbours
    one_measure(5 * CM);
    one_measure(5 * CM - 1);
    one_measure(5 * CM + 1);
    one_measure(1);
    one_measure(400 * CM);
    one_measure(600 * CM);    // beyond 9 bits: saturates at 511
    for (int i = 0; i < 40; i++) begin
      w = $urandom_range(1, 400 * CM + 5);
      one_measure(w);
    end
    // continuous: start held high, three back-to-back measurements
    n_before = trig_pulses;
    @(negedge ck) start = 1'b1;
    for (int i = 0; i < 3; i++) begin
      w = $urandom_range(CM, 50 * CM);
      sensor(w, 1'b0);
      while (!data_valid) @(negedge ck);
      check(distance == 9'(w / CM), $sformatf("continuous W=%0d distance %0d", w, distance));
    end
    start = 1'b0;
    check(trig_pulses == n_before + 3, "continuous trigger count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
