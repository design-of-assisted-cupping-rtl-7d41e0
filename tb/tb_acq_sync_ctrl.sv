// tb_acq_sync_ctrl: self-checking test of acq_sync_ctrl. Issues triggers with
// timestamps and lets the two sensors finish in either order, at different
// delays, and once not at all (timeout). Checks that exactly one record comes
// per trigger, only after both sensors are done, with the trigger's timestamp,
// both values, the ok flags and ts_match; and that both FIFOs are read in the
// same clocks.
`timescale 1ns/1ps
module tb_acq_sync_ctrl;
  import cupping_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic trig = 0, dd = 0, dok = 0, bd = 0, bok = 0, rv;
  logic [31:0] ts = 0;
  logic signed [15:0] dt = 0, bt = 0;
  logic [15:0] dh = 0;
  logic [19:0] bp = 0;
  sensor_rec_t rec;
  logic [7:0] missed;
  int checks = 0, failures = 0;

  acq_sync_ctrl #(.TIMEOUT_CYC(500), .DEPTH(4)) dut (
    .clk, .rst_n, .trig, .timestamp(ts), .dht_done(dd), .dht_ok(dok), .dht_temp(dt),
    .dht_hum(dh), .bmp_done(bd), .bmp_ok(bok), .bmp_temp(bt), .bmp_press(bp),
    .rec_valid(rv), .rec, .missed_trig(missed));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  int nrec = 0;
  always @(posedge clk) if (rst_n) begin
    if (rv) nrec++;
    check(dut.u_fifo_dht.do_rd == dut.u_fifo_bmp.do_rd, "FIFOs read together");
  end

  task automatic run(input int d_dht, input int d_bmp, input bit bmp_answers);
    int n0;
    logic [31:0] tsv;
    n0 = nrec;
    tsv = $urandom;
    @(negedge clk) ts = tsv; trig = 1;
    @(negedge clk) trig = 0; ts = ts + 1;
    fork
      begin repeat (d_dht) @(negedge clk); dt = 16'($urandom); dh = 16'($urandom); dok = 1; dd = 1;
            @(negedge clk) dd = 0; end
      begin if (bmp_answers) begin repeat (d_bmp) @(negedge clk);
            bt = 16'($urandom); bp = 20'($urandom); bok = 1; bd = 1; @(negedge clk) bd = 0; end end
    join
    check(nrec == n0, "no record before both sensors finished");
    repeat (bmp_answers ? 6 : 520) @(negedge clk);
    check(nrec == n0 + 1, "one record per trigger");
    check(rec.timestamp == tsv && rec.ts_match, "timestamp of the trigger, matching");
    check(rec.t_dht == dt && rec.humidity == dh && rec.dht_ok, "DHT11 values");
    if (bmp_answers) check(rec.t_bmp == bt && rec.press == bp && rec.bmp_ok, "BMP280 values");
    else check(!rec.bmp_ok, "missing BMP280 flagged");
  endtask

  initial begin
    #200_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(10, 40, 1);
    run(50, 5, 1);
    run(20, 20, 1);
    run(30, 0, 0);
    run(3, 7, 1);
    // trigger during collection is counted as missed
    @(negedge clk) trig = 1; @(negedge clk) trig = 0;
    @(negedge clk) trig = 1; @(negedge clk) trig = 0;
    check(missed == 8'd1, "missed trigger counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
