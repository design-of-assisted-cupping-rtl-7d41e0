// async_fifo: dual-clock FIFO for the camera-to-Ethernet clock crossing.
//
// Write and read sides run on independent clocks. Each side keeps a binary
// pointer one bit wider than the address and its Gray-coded copy; the Gray
// pointer is passed to the other side through a two-flop synchroniser, so at
// most one bit changes per transfer and a metastable sample can only yield the
// old or the new value. Full is detected when the synchronised read pointer
// equals the write pointer with its two top bits inverted, empty when the
// synchronised write pointer equals the read pointer. The storage is a
// 2^ADDR_W x WIDTH memory with registered read data.
// Interface: wr_en/wdata accepted when !full; rd_en pops when !empty and rdata
// is valid the clock after. Flags are pessimistic by the synchroniser delay.
// The Gray-code pointer scheme follows the document; depth and width are this
// design's choices.
module async_fifo #(
  parameter int WIDTH  = 17,
  parameter int ADDR_W = 11
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  logic [WIDTH-1:0] mem [2**ADDR_W];
  logic [ADDR_W:0] wbin, wgray, rbin, rgray;
  logic [ADDR_W:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [ADDR_W:0] wbin_n, rbin_n;

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign wbin_n = wbin + (ADDR_W+1)'(wr_en && !full);
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin <= wbin_n;
      wgray <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  assign full = (wgray == {~rgray_w2[ADDR_W:ADDR_W-1], rgray_w2[ADDR_W-2:0]});
  always_ff @(posedge wclk)
    if (wr_en && !full) mem[wbin[ADDR_W-1:0]] <= wdata;

  // read side
  assign rbin_n = rbin + (ADDR_W+1)'(rd_en && !empty);
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin <= rbin_n;
      rgray <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign empty = (rgray == wgray_r2);
  always_ff @(posedge rclk)
    if (rd_en && !empty) rdata <= mem[rbin[ADDR_W-1:0]];
endmodule
