// tb_meter_sweep: the controller and the sensor model together, over the
// whole range.
//
// control_maxsonar is connected to hc_sr04_emulator, as when the controller is
// tested against a simulated sensor. Every distance setting from 0 to 511 cm
// is measured once, in random order, each started by a one-cycle start pulse
// after a random idle time. The reading must equal the setting clamped to the
// sensor range of 2..400 cm. The timings are shortened (4-cycle centimetre,
// 12-cycle trigger, 2-cycle burst half-period).
module tb_meter_sweep;
  localparam int unsigned CM   = 4;
  localparam int unsigned TRL  = 12;

  logic       ck = 1'b0;
  logic       reset = 1'b1;
  logic       start = 1'b0;
  logic       trigger, echo, tx_burst, data_valid;
  logic [8:0] distance;
  logic [8:0] setting = '0;
  int checks = 0, failures = 0;
  int order [512];

  always #5 ck = ~ck;

  control_maxsonar #(.TRIG_LEN(TRL), .CM_CYCLES(CM)) u_ctrl (
    .ck(ck), .reset(reset), .start(start), .echo(echo),
    .trigger(trigger), .distance(distance), .data_valid(data_valid));

  hc_sr04_emulator #(.CM_CYCLES(CM), .TRIG_MIN(TRL - 2), .HALF_CYCLES(2)) u_emu (
    .ck(ck), .reset(reset), .trigger(trigger), .distance_cm(setting),
    .echo(echo), .tx_burst(tx_burst));

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_d, n;
    for (int i = 0; i < 512; i++) order[i] = i;
    order.shuffle();
    repeat (3) @(posedge ck);
    @(negedge ck) reset = 1'b0;
    foreach (order[i]) begin
      repeat ($urandom_range(1, 20)) @(negedge ck);
      setting = 9'(order[i]);
      exp_d = order[i] < 2 ? 2 : (order[i] > 400 ? 400 : order[i]);
      start = 1'b1;
      @(negedge ck) start = 1'b0;
      n = 0;
      @(negedge ck);
      while (!data_valid && n < 10_000) begin
        @(negedge ck);
        n++;
      end
      checks++;
      if (!data_valid || distance != 9'(exp_d)) begin
        failures++;
        $display("ERROR setting %0d read %0d, expected %0d", order[i], distance, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
