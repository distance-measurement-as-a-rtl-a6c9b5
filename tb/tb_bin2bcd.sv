// tb_bin2bcd: exhaustive check of the binary to BCD converter.
//
// Every 9-bit value 0..511 is applied and the four digits are compared with
// the value's decimal digits, computed with division and remainder.
module tb_bin2bcd;
  logic [8:0]      bin;
  logic [3:0][3:0] bcd;
  int checks = 0, failures = 0;

  bin2bcd dut (.bin(bin), .bcd(bcd));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      bin = 9'(v);
      #1;
      for (int d = 0; d < 4; d++) begin
        int p;
        p = 1;
        for (int k = 0; k < d; k++) p *= 10;
        checks++;
        if (int'(bcd[d]) != (v / p) % 10) begin
          failures++;
          $display("ERROR %0d digit %0d = %0d", v, d, bcd[d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
