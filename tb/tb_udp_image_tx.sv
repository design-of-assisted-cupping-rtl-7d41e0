// tb_udp_image_tx: self-checking test of udp_image_tx (IMG_W 16, IMG_H 8).
// A row memory with a registered read port stands in for the ping-pong
// buffer. Three rows are sent; eth_frame_checker checks every header field,
// the IPv4 checksum, the payload CRC-32 and the FCS, and the testbench
// compares the pixels and row numbers. Also checks the frame length in
// clocks (one byte per clock), the inter-frame gap, row_done timing and that
// the IPv4 identification advances.
`timescale 1ns/1ps
module tb_udp_image_tx;
  localparam int W = 16, H = 8;
  logic clk = 0, rst_n = 1;
  always #4 clk = ~clk;
  logic rready = 0, rdone, en, er;
  logic [15:0] ridx = 0, rdata;
  logic [3:0] raddr;
  logic [7:0] txd;
  int checks = 0, failures = 0;
  udp_image_tx #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .row_ready(rready), .row_idx(ridx),
    .rd_addr(raddr), .rd_data(rdata), .row_done(rdone), .gmii_txd(txd), .gmii_tx_en(en), .gmii_tx_er(er));
  eth_frame_checker #(.IMG_W(W), .IMG_H(H)) mon (.clk, .en, .d(txd));

  logic [15:0] mem [W];
  always @(posedge clk) rdata <= mem[raddr];

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  int en_cycles = 0, gap = 0, min_gap = 1000, ndone = 0;
  bit seen = 0, en_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (en && !en_d && seen && gap < min_gap) min_gap = gap;
    if (en) begin en_cycles++; gap = 0; seen = 1; end
    else gap++;
    en_d = en;
    if (rdone) ndone++;
    check(!er, "tx_er low");
  end

  initial begin
    #200_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] sent [$][$];
    logic [15:0] id0;
    #1 rst_n = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      logic [15:0] row [$];
      row.delete();
      for (int x = 0; x < W; x++) begin mem[x] = 16'($urandom); row.push_back(mem[x]); end
      sent.push_back(row);
      ridx = 16'(r + 5); rready = 1;
      while (!rdone) @(negedge clk);
      rready = 0;
      repeat (60) @(negedge clk);
    end
    check(mon.frames == 3, $sformatf("%0d frames", mon.frames));
    check(mon.errors == 0, $sformatf("%0d frame errors", mon.errors));
    for (int r = 0; r < mon.frames; r++) begin
      check(mon.row_no[r] == r + 5, "row number");
      for (int x = 0; x < W; x++) check(mon.rows[r][x] == sent[r][x], $sformatf("row %0d pixel %0d", r, x));
    end
    check(en_cycles == 3 * (8 + 14 + 20 + 8 + 8 + 2 * W + 4 + 4), $sformatf("%0d bytes", en_cycles));
    check(min_gap >= 12, $sformatf("inter-frame gap %0d", min_gap));
    check(ndone == 3, "one row_done per row");
    check(checks > 0 && mon.checks >= 45, "monitor ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks + mon.checks, failures + mon.errors);
    $finish;
  end
endmodule
