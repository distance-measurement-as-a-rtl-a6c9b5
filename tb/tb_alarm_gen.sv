// tb_alarm_gen: self-checking test of the proximity alarm.
//
// With a 10-cycle millisecond, each distance is presented with a one-cycle
// data_valid; the testbench then watches the buzzer for one full pattern
// period and counts the cycles it sounds (alarm low). Expected on-time and
// period come from the zone table: >100 cm silent, 75..100 100 of 1000 ms,
// 50..75 200 of 700 ms, 10..50 200 of 400 ms, <10 always on. Zone edges are
// tested on both sides. Before any measurement the buzzer must be silent.
module tb_alarm_gen;
  localparam int unsigned TPM = 10;

  logic       ck = 1'b0;
  logic       reset = 1'b1;
  logic [8:0] distance = '0;
  logic       data_valid = 1'b0;
  logic       alarm;
  int checks = 0, failures = 0;

  always #5 ck = ~ck;

  alarm_gen #(.TICKS_PER_MS(TPM)) dut (
    .ck(ck), .reset(reset), .distance(distance), .data_valid(data_valid), .alarm(alarm));

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // on/period in ms for a distance
  task automatic expect_of(input int d, output int on_ms, output int per_ms);
    if (d > 100)      begin on_ms = 0;   per_ms = 1000; end
    else if (d > 75)  begin on_ms = 100; per_ms = 1000; end
    else if (d > 50)  begin on_ms = 200; per_ms = 700;  end
    else if (d >= 10) begin on_ms = 200; per_ms = 400;  end
    else              begin on_ms = 1000; per_ms = 1000; end
  endtask

  task automatic try(input int d);
    int on_ms, per_ms, low, first_low;
    expect_of(d, on_ms, per_ms);
    @(negedge ck);
    distance = 9'(d);
    data_valid = 1'b1;
    @(negedge ck);
    data_valid = 1'b0;
    distance = 9'($urandom_range(0, 511));   // ignored without data_valid
    @(negedge ck);
    low = 0;
    first_low = -1;
    for (int c = 0; c < per_ms * TPM; c++) begin
      @(negedge ck);
      if (!alarm) begin
        low++;
        if (first_low < 0) first_low = c;
      end
    end
    checks++;
    if (low != on_ms * TPM) begin
      failures++;
      $display("ERROR d=%0d: buzzer on %0d of %0d cycles, expected %0d",
               d, low, per_ms * TPM, on_ms * TPM);
    end
    if (on_ms > 0) begin
      checks++;
      if (first_low != 0) begin
        failures++;
        $display("ERROR d=%0d: pattern did not start with a beep", d);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge ck);
    @(negedge ck) reset = 1'b0;
    repeat (2000) begin
      @(negedge ck);
      checks++;
      if (!alarm) begin
        failures++;
        $display("ERROR buzzer on before any measurement");
        break;
      end
    end
    try(300); try(150); try(101); try(100); try(90); try(76);
    try(75);  try(60);  try(51);  try(50);  try(30); try(25);
    try(11);  try(10);  try(9);   try(5);   try(2);  try(0); try(200);
    for (int i = 0; i < 10; i++) try($urandom_range(0, 130));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
