// tb_async_fifo: self-checking test of async_fifo with unrelated write
// (10 ns) and read (7.3 ns, then 23 ns) clocks and random enables. Every word
// read must equal the next word written, none lost or repeated; full and
// empty must stop writes and reads; and the FIFO must fill completely.
`timescale 1ns/1ps
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst_n = 0;
  real rhalf = 3.65;
  always #5 wclk = ~wclk;
  always #(rhalf) rclk = ~rclk;
  logic wr = 0, rd = 0, full, empty;
  logic [16:0] wd = 0, rq;
  int checks = 0, failures = 0;
  async_fifo #(.WIDTH(17), .ADDR_W(4)) dut (.wclk, .wrst_n(rst_n), .wr_en(wr), .wdata(wd), .full,
    .rclk, .rrst_n(rst_n), .rd_en(rd), .rdata(rq), .empty);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [16:0] q [$];
  int nw = 0, nr = 0, saw_full = 0;
  bit wmode = 1, rmode = 1;
  always @(posedge wclk) if (rst_n) begin
    if (wr && !full) begin q.push_back(wd); nw++; end
    if (full) saw_full++;
  end
  bit pend = 0;
  always @(posedge rclk) if (rst_n) begin
    if (pend) begin
      logic [16:0] e;
      e = q.pop_front();
      check(rq == e, $sformatf("read %h expected %h", rq, e));
      nr++;
    end
    pend = rd && !empty;
  end
  always @(negedge wclk) begin wr <= wmode ? ($urandom % 4 != 0) : 1'b1; wd <= 17'($urandom); end
  always @(negedge rclk) rd <= rmode ? ($urandom % 3 != 0) : 1'b0;

  initial begin
    #400_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #33 rst_n = 1;
    #40_000;
    rmode = 0; wmode = 0;       // reads stop, writes continue: must fill
    #2_000;
    check(saw_full > 0 && q.size() == 16, $sformatf("filled to %0d", q.size()));
    rmode = 1; wmode = 1; rhalf = 11.5;
    #60_000;
    wmode = 1;
    check(nr > 1000, $sformatf("words transferred %0d", nr));
    check(nw - nr <= 17, "no words lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
