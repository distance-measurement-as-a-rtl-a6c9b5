// tb_start_mux: self-checking test of the start selection.
//
// Unitary mode (mode = 0): random presses of mide, each held and released for
// several cycles, must give exactly one single-cycle start pulse per press,
// three cycles after the press. Continuous mode (mode = 1): start must be
// high from three cycles after the switch until it is switched back.
module tb_start_mux;
  logic ck = 1'b0;
  logic reset = 1'b1;
  logic mode = 1'b0;
  logic mide = 1'b0;
  logic start;
  int checks = 0, failures = 0;
  int pulses = 0, presses = 0;
  int hist[$];

  always #5 ck = ~ck;

  start_mux dut (.ck(ck), .reset(reset), .mode(mode), .mide(mide), .start(start));

  initial begin
    #1_000_000;
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

  // expected start: pulse 3 cycles after a rising mide in unitary mode
  int cyc = 0;
  logic [7:0] mide_h = '0, mode_h = '0;
  always @(negedge ck) begin
    if (!reset) begin
      logic expd;
      expd = mode_h[2] ? 1'b1 : (mide_h[2] & ~mide_h[3]);
      check(start == expd, $sformatf("cycle %0d start=%0b expected %0b", cyc, start, expd));
      if (start && !mode) pulses++;
    end
    cyc++;
  end
  always @(posedge ck) begin
    mide_h <= {mide_h[6:0], mide};
    mode_h <= {mode_h[6:0], mode};
  end

  initial begin
    repeat (3) @(posedge ck);
    @(negedge ck) reset = 1'b0;
    for (int i = 0; i < 30; i++) begin
      repeat ($urandom_range(4, 20)) @(negedge ck);
      mide = 1'b1;
      presses++;
      repeat ($urandom_range(4, 20)) @(negedge ck);
      mide = 1'b0;
    end
    repeat (10) @(negedge ck);
    check(pulses == presses, $sformatf("%0d pulses for %0d presses", pulses, presses));
    mode = 1'b1;
    repeat (50) @(negedge ck);
    mide = 1'b1;
    repeat (10) @(negedge ck);
    mide = 1'b0;
    repeat (10) @(negedge ck);
    mode = 1'b0;
    repeat (10) @(negedge ck);
    check(!start, "start low after leaving continuous mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
