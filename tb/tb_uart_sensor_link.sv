// tb_uart_sensor_link: self-checking test of uart_sensor_link. A stub UART
// accepts a byte every few clocks. Sends records and checks every byte of the
// 17-byte frame against a frame built here, including the 8-bit sum; a record
// arriving mid-frame must be counted as dropped. Feeds host control frames
// (good set point, pump enable and zero-bias, one with a bad sum, one with an
// unknown command) and checks the registers and counters.
`timescale 1ns/1ps
module tb_uart_sensor_link;
  import cupping_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rv = 0, tv, tr = 0, rxv = 0, pump_en;
  sensor_rec_t rec;
  logic signed [15:0] tf = 0, tc = 0, dtv;
  logic [7:0] txd, rxd = 0, sent, ok, errs, dropped;
  logic [19:0] sp;
  int checks = 0, failures = 0;
  uart_sensor_link dut (.clk, .rst_n, .rec_valid(rv), .rec, .t_fused(tf), .t_dht_cal(tc),
    .tx_valid(tv), .tx_data(txd), .tx_ready(tr), .rx_valid(rxv), .rx_data(rxd),
    .setpoint(sp), .pump_en, .delta_t(dtv), .frames_sent(sent), .cmds_ok(ok),
    .rx_errors(errs), .tx_dropped(dropped));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] got [$];
  int gap = 0;
  always @(posedge clk) begin
    tr <= 1'b0;
    if (gap > 0) gap <= gap - 1;
    else begin tr <= 1'b1; if (tv && tr) begin got.push_back(txd); gap <= 5; tr <= 1'b0; end end
  end

  task automatic host(input logic [7:0] c, input logic [15:0] v, input bit bad);
    logic [7:0] f [6];
    f = '{8'hAA, 8'h55, c, v[15:8], v[7:0], 8'h00};
    f[5] = f[0] + f[1] + f[2] + f[3] + f[4] + (bad ? 8'd1 : 8'd0);
    for (int i = 0; i < 6; i++) begin
      @(negedge clk) rxd = f[i]; rxv = 1;
      @(negedge clk) rxv = 0;
      repeat (3) @(negedge clk);
    end
  endtask

  initial begin
    #500_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] e [17];
    logic [7:0] s;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3; n++) begin
      rec = sensor_rec_t'({$urandom, $urandom, $urandom});
      tf = 16'($urandom); tc = 16'($urandom);
      e = '{8'hAA, 8'h55, rec.timestamp[31:24], rec.timestamp[23:16], rec.timestamp[15:8],
            rec.timestamp[7:0], tf[15:8], tf[7:0], tc[15:8], tc[7:0], rec.humidity[15:8],
            rec.humidity[7:0], {4'd0, rec.press[19:16]}, rec.press[15:8],
            rec.press[7:0], {5'd0, rec.ts_match, rec.bmp_ok, rec.dht_ok}, 8'h00};
      s = 0; for (int i = 0; i < 16; i++) s += e[i]; e[16] = s;
      got.delete();
      @(negedge clk) rv = 1; @(negedge clk) rv = 0;
      repeat (20) @(negedge clk);
      if (n == 1) begin rv = 1; @(negedge clk) rv = 0; end     // arrives mid-frame
      repeat (150) @(negedge clk);
      check(got.size() == 17, $sformatf("frame length %0d", got.size()));
      for (int i = 0; i < 17 && i < got.size(); i++)
        check(got[i] == e[i], $sformatf("frame %0d byte %0d: %h expected %h", n, i, got[i], e[i]));
    end
    check(sent == 3 && dropped == 1, $sformatf("sent %0d dropped %0d", sent, dropped));
    host(8'h01, 16'h1234, 0);
    check(sp == 20'h12340, "set point");
    host(8'h02, 16'h0001, 0);
    check(pump_en, "pump enabled");
    host(8'h03, 16'hFF9C, 0);
    check(dtv == -16'sd100, "zero-bias coefficient");
    host(8'h01, 16'h0BAD, 1);
    check(sp == 20'h12340 && errs == 1, "bad checksum ignored");
    host(8'h7E, 16'h0000, 0);
    check(errs == 2 && ok == 3, "unknown command counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
