// sync_fifo: single-clock FIFO used as the per-sensor buffer.
// A DEPTH x WIDTH memory (block-RAM style, registered read) with binary
// read/write pointers and an occupancy count. The acquisition controller
// writes the trigger timestamp at the first address of a record and the
// sensor result after it.
// Interface: wr_en writes wdata when !full; rd_en pops when !empty and rdata
// holds the popped word from the next clock on. count is the occupancy.
// Depth and width are this design's choices; the document names synchronous
// FIFOs without giving their size.
module sync_fifo #(
  parameter int WIDTH = 41,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign empty = (count == '0);
  assign full  = (count == ($bits(count))'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + ($bits(count))'(do_wr) - ($bits(count))'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
    if (do_rd) rdata <= mem[rp];
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
