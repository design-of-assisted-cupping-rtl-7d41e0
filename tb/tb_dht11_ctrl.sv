// tb_dht11_ctrl: self-checking test of dht11_ctrl with the DHT11 model.
// Runs the controller at a scaled clock (CLK_HZ = 1 MHz, one clock = one
// model microsecond = 10 ns of simulated time). Reads two frames with known
// humidity/temperature bytes and a correct checksum, one frame with a bad
// checksum (ok must be 0) and one with a mute sensor (timeout, ok = 0). Checks
// the decoded temperature in 0.01 C, the humidity bytes and the length of the
// start pulse (18 ms).
`timescale 1ns/1ps
module tb_dht11_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, bus_oe, dev_oe, busy, done, ok, mute = 0;
  logic [39:0] data, frame;
  logic [15:0] hum;
  logic signed [15:0] temp;
  wire line = !(bus_oe | dev_oe);
  int checks = 0, failures = 0;

  dht11_ctrl #(.CLK_HZ(1_000_000)) dut (
    .clk, .rst_n, .start, .bus_oe, .bus_in(line), .busy, .done, .ok, .data,
    .humidity(hum), .temp_c100(temp));
  dht11_model #(.US(10)) sensor (.line, .frame, .mute, .dev_oe);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint low_cycles;
  always @(posedge clk) if (bus_oe) low_cycles++;

  task automatic read(input logic [7:0] hi, hd, ti, td, input bit badsum, input bit expect_ok);
    logic [7:0] s;
    s = hi + hd + ti + td;
    frame = {hi, hd, ti, td, badsum ? s + 8'd1 : s};
    low_cycles = 0;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    check(ok == expect_ok, $sformatf("ok=%0d expected %0d", ok, expect_ok));
    check(low_cycles >= 18000 && low_cycles <= 18003, $sformatf("start pulse %0d us", low_cycles));
    if (expect_ok) begin
      check(data == frame, "raw frame");
      check(hum == {hi, hd}, "humidity");
      check(temp == 16'(ti) * 100 + 16'(td) * 10, $sformatf("temperature %0d", temp));
    end
    repeat (2000) @(negedge clk);
  endtask

  initial begin
    #20_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int unsigned n0;
  initial begin
    repeat (5) @(negedge clk); rst_n = 1;
    read(8'd55, 8'd0, 8'd24, 8'd3, 0, 1);
    read(8'd80, 8'd0, 8'd37, 8'd9, 0, 1);
    read(8'd40, 8'd0, 8'd20, 8'd0, 1, 0);
    mute = 1;
    n0 = sensor.reads;
    read(8'd40, 8'd0, 8'd20, 8'd0, 0, 0);
    check(sensor.reads == n0, "mute sensor did not answer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
