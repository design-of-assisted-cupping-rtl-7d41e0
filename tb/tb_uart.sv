// tb_uart: self-checking loop-back test of uart_tx and uart_rx (CLK_HZ/BAUD
// = 16 clocks per bit). Sends random bytes back to back and checks each
// received byte, the 10-bit frame length, the start/stop levels on the wire,
// and that a frame with a low stop bit raises frame_err.
`timescale 1ns/1ps
module tb_uart;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tv = 0, tr, txd, rv, ferr, rxd_mux, force_low = 0;
  logic [7:0] td = 0, rd;
  int checks = 0, failures = 0;
  assign rxd_mux = txd & !force_low;
  uart_tx #(.CLK_HZ(1600), .BAUD(100)) u_tx (.clk, .rst_n, .tx_valid(tv), .tx_data(td), .tx_ready(tr), .txd);
  uart_rx #(.CLK_HZ(1600), .BAUD(100)) u_rx (.clk, .rst_n, .rxd(rxd_mux), .rx_valid(rv), .rx_data(rd), .frame_err(ferr));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] sent [$];
  always @(posedge clk) if (rv && rst_n) begin
    logic [7:0] e;
    check(sent.size() > 0, "unexpected byte");
    if (sent.size() > 0) begin e = sent.pop_front(); check(rd == e, $sformatf("got %h expected %h", rd, e)); end
  end

  longint start_t, idle_t;
  initial begin
    #2_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (20) @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      while (!tr) @(negedge clk);
      td = 8'($urandom); tv = 1; sent.push_back(td);
      @(negedge clk); tv = 0;
      start_t = $time;
      @(negedge clk); check(txd == 0, "start bit low");
      while (!tr) @(negedge clk);
      check(($time - start_t) / 10 >= 159 && ($time - start_t) / 10 <= 161, $sformatf("frame %0d clocks", ($time - start_t) / 10));
    end
    repeat (40) @(negedge clk);
    check(sent.size() == 0, "all bytes received");
    check(!ferr, "no framing error");
    // corrupt the stop bit of one frame
    td = 8'hFF; tv = 1; @(negedge clk); tv = 0;
    repeat (16 * 9 + 2) @(negedge clk);
    force_low = 1; repeat (16) @(negedge clk); force_low = 0;
    repeat (40) @(negedge clk);
    check(ferr, "framing error detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
