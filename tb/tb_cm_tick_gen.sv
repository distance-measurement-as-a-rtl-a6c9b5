// tb_cm_tick_gen: self-checking test of the centimetre divider.
//
// A small divider (DIV = 7) is cleared at random moments; a reference counts
// the cycles since the last clear and expects a tick whenever that count is a
// multiple of DIV. A second instance at the default DIV = 5800 is checked for
// the exact cycle of its first two ticks.
module tb_cm_tick_gen;
  localparam int unsigned DIV = 7;

  logic ck = 1'b0;
  logic reset = 1'b1;
  logic clear = 1'b0;
  logic tick, tick_full;
  int   checks = 0;
  int   failures = 0;
  int   since;      // cycles since the last clear (or reset)
  int   cyc_full;
  int   ticks_seen = 0;

  always #5 ck = ~ck;

  cm_tick_gen #(.DIV(DIV)) dut (.ck(ck), .reset(reset), .clear(clear), .tick(tick));
  cm_tick_gen dut_full (.ck(ck), .reset(reset), .clear(1'b0), .tick(tick_full));

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge ck);
    reset <= 1'b0;
    since = 0;
    cyc_full = 0;
    fork
      begin
        for (int i = 0; i < 3000; i++) begin
          @(negedge ck);
          since++;
          checks++;
          if (tick !== ((since % DIV) == 0)) begin
            failures++;
            $display("ERROR cycle %0d since clear: tick=%0b", since, tick);
          end
          if (tick) ticks_seen++;
          clear = ($urandom_range(0, 99) < 3);
          @(posedge ck);
          if (clear) since = 0;
          #1 clear = 1'b0;
        end
      end
      begin
        // default divider: ticks at cycle 5800 and 11600 after reset
        forever begin
          @(negedge ck);
          cyc_full++;
          if (tick_full) begin
            checks++;
            if (cyc_full != 5800 && cyc_full != 11600 && cyc_full != 17400) begin
              failures++;
              $display("ERROR default divider ticked at cycle %0d", cyc_full);
            end
          end
        end
      end
    join_any
    checks++;
    if (ticks_seen < 100) begin
      failures++;
      $display("ERROR too few ticks: %0d", ticks_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
