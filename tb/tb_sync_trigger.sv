// tb_sync_trigger: self-checking test of sync_trigger with CLK_HZ = 1000
// (one "second" = 1000 clocks), DHT_OFFSET = 7 and BMP_OFFSET = 0. Checks the
// pps period, that the first pps comes right after reset, the timestamp
// increments, and the per-sensor trigger delays.
`timescale 1ns/1ps
module tb_sync_trigger;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pps, trig_dht, trig_bmp;
  logic [31:0] ts;
  int checks = 0, failures = 0;

  sync_trigger #(.CLK_HZ(1000), .DHT_OFFSET(7), .BMP_OFFSET(0)) dut (
    .clk, .rst_n, .pps, .trig_dht, .trig_bmp, .timestamp(ts));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc = 0, last_pps = -1, last_ts_seen;
  int npps = 0, ndht = 0, nbmp = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (pps) begin
      if (last_pps >= 0) check(cyc - last_pps == 1000, $sformatf("pps period %0d", cyc - last_pps));
      else check(cyc <= 2, "first pps right after reset");
      check(ts == 32'(npps), $sformatf("timestamp %0d before pps %0d", ts, npps));
      last_pps = cyc; npps++;
    end
    if (trig_bmp) begin nbmp++; check(pps, "BMP280 trigger coincides with pps"); end
    if (trig_dht) begin ndht++; check(cyc - last_pps == 7, $sformatf("DHT11 offset %0d", cyc - last_pps)); end
  end

  initial begin
    #200_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5500) @(negedge clk);
    check(npps == 6 && ndht == 6 && nbmp == 6, $sformatf("counts %0d %0d %0d", npps, ndht, nbmp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
