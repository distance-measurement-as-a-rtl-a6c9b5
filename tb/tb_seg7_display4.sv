// tb_seg7_display4: self-checking test of the scanned 4-digit display.
//
// With a short refresh period, random digit values are applied; in every
// cycle exactly one anode must be low, its segments must match the 7-segment
// pattern of that digit (table below, active low, {g..a}), each digit must
// stay lit for REFRESH cycles, and the digits must be visited in order.
module tb_seg7_display4;
  localparam int unsigned REFRESH = 4;

  logic ck = 1'b0;
  logic reset = 1'b1;
  logic [3:0][3:0] bcd = '0;
  logic [3:0] an;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  // segments a..g lit for 0..9, written as the lit segment letters
  function automatic logic [6:0] pattern(input int v);
    string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                         "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
    logic [6:0] p;
    p = '0;
    if (v < 10)
      foreach (lit[v][i]) p[lit[v][i] - "a"] = 1'b1;
    return ~p;   // active low
  endfunction

  always #5 ck = ~ck;

  seg7_display4 #(.REFRESH_CYCLES(REFRESH)) dut (.ck(ck), .reset(reset), .bcd(bcd), .an(an), .seg(seg));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cur, run, prev;
    repeat (3) @(posedge ck);
    @(negedge ck) reset = 1'b0;
    @(negedge ck);
    prev = -1;
    run = 0;
    for (int blk = 0; blk < 40; blk++) begin
      // hold the digits for two full scans, then change them
      for (int d = 0; d < 4; d++) bcd[d] = 4'($urandom_range(0, 9));
      if (blk == 39) bcd[2] = 4'd12;   // non-BCD code shows blank
      @(negedge ck);
      @(negedge ck);
      for (int c = 0; c < 8 * REFRESH; c++) begin
        @(negedge ck);
        checks++;
        cur = -1;
        for (int k = 0; k < 4; k++) if (an == ~(4'b1 << k)) cur = k;
        if (cur < 0) begin
          failures++;
          $display("ERROR anodes %b not one-hot low", an);
          continue;
        end
        checks++;
        if (seg != pattern(int'(bcd[cur]))) begin
          failures++;
          $display("ERROR digit %0d value %0d seg %b", cur, bcd[cur], seg);
        end
        if (cur == prev) run++;
        else begin
          if (prev >= 0 && run == REFRESH) begin
            checks++;
            if (cur != (prev + 1) % 4) begin
              failures++;
              $display("ERROR scan order %0d -> %0d", prev, cur);
            end
          end else if (prev >= 0 && c > REFRESH) begin
            checks++;
            failures++;
            $display("ERROR digit %0d lit %0d cycles", prev, run);
          end
          prev = cur;
          run = 1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
