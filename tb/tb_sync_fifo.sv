// tb_sync_fifo: self-checking test of sync_fifo (DEPTH 8) against a queue
// model under random simultaneous reads and writes, including filling to full
// and draining to empty. Checks data order, flags and count.
`timescale 1ns/1ps
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr = 0, rd = 0, empty, full;
  logic [40:0] wd = 0, rq;
  logic [3:0] count;
  int checks = 0, failures = 0;
  sync_fifo #(.WIDTH(41), .DEPTH(8)) dut (.clk, .rst_n, .wr_en(wr), .wdata(wd), .rd_en(rd),
                                         .rdata(rq), .empty, .full, .count);
  logic [40:0] model [$];
  bit pend = 0;
  logic [40:0] pend_v;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      if (pend) check(rq == pend_v, "read data");
      pend = 0;
      check(empty == (model.size() == 0) && full == (model.size() == 8) && count == 4'(model.size()),
            $sformatf("flags at size %0d", model.size()));
      // phases: fill, drain, random
      case ((i / 100) % 3)
        0: begin wr = !full; rd = 0; end
        1: begin wr = 0; rd = !empty; end
        default: begin wr = !full && ($urandom % 2); rd = !empty && ($urandom % 2); end
      endcase
      wd = {$urandom, 9'($urandom)};
      if (rd) begin pend = 1; pend_v = model.pop_front(); end
      if (wr) model.push_back(wd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
