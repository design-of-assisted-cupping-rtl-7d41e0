// tb_pingpong_buf: self-checking test of pingpong_buf (IMG_W 8, IMG_H 3).
// A queue stands in for the FIFO. A reader with random delays reads full
// banks and releases them. Checks row order and numbering (wrapping at
// IMG_H, restarting at a start-of-frame pixel), pixel data, that the FIFO is
// not popped while both banks are full, and that both banks get used.
`timescale 1ns/1ps
module tb_pingpong_buf;
  localparam int W = 8, H = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic frd, fempty, rready, rdone = 0;
  logic [16:0] fq;
  logic [15:0] ridx, rdata;
  logic [2:0] raddr = 0;
  int checks = 0, failures = 0;
  pingpong_buf #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .fifo_rd(frd), .fifo_empty(fempty),
    .fifo_rdata(fq), .row_ready(rready), .row_idx(ridx), .rd_addr(raddr), .rd_data(rdata),
    .row_done(rdone));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [16:0] src [$];
  assign fempty = (src.size() == 0);
  always @(posedge clk) if (frd) fq <= src.pop_front();
  int banks_used [2] = '{0, 0};
  always @(posedge clk) if (rst_n) begin
    if (frd) check(!(dut.bank_full[0] && dut.bank_full[1]), "no pop while both banks full");
    if (dut.pop_q) banks_used[dut.wb]++;
  end

  initial begin
    #500_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] rows [$][$];
    int exp_row [$];
    repeat (3) @(negedge clk); rst_n = 1;
    // 2 frames of H rows, the second starting after a partial row
    for (int f = 0; f < 2; f++) begin
      if (f == 1) repeat (3) src.push_back({1'b0, 16'hDEAD});     // partial row, discarded by SOF
      for (int r = 0; r < H + 1; r++) begin
        logic [15:0] row [$];
        row.delete();
        for (int x = 0; x < W; x++) begin
          logic [15:0] p;
          p = 16'($urandom);
          row.push_back(p);
          src.push_back({(r == 0 && x == 0), p});
        end
        rows.push_back(row);
        exp_row.push_back(r % H);
      end
    end
    for (int k = 0; k < rows.size(); k++) begin
      int t;
      t = 0;
      while (!rready) begin @(negedge clk); t++; if (t > 2000) break; end
      repeat ($urandom % 40) @(negedge clk);
      check(ridx == 16'(exp_row[k]), $sformatf("row %0d number %0d expected %0d", k, ridx, exp_row[k]));
      for (int x = 0; x < W; x++) begin
        raddr = 3'(x); @(negedge clk);
        check(rdata == rows[k][x], $sformatf("row %0d pixel %0d got %h exp %h", k, x, rdata, rows[k][x]));
      end
      rdone = 1; @(negedge clk); rdone = 0; @(negedge clk);
    end
    check(banks_used[0] > 0 && banks_used[1] > 0, "both banks used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
