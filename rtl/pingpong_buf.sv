// pingpong_buf: two-row ping-pong buffer between the clock-crossing FIFO and
// the UDP packetiser, in the Ethernet clock domain.
//
// Pixels popped from the FIFO carry a start-of-frame flag in bit 16. They are
// written into one of two row banks; when a bank holds IMG_W pixels it is
// marked full with its row number and writing moves to the other bank, while
// the packetiser reads the full bank and hands it back with row_done. A
// start-of-frame pixel restarts the row count and the column. The FIFO is
// popped at most every other clock and only while the bank being written is
// free, so it simply fills up (back-pressure) if the Ethernet side is busy.
// Interface: fifo_rd/fifo_empty/fifo_rdata (data valid the clock after
// fifo_rd); row_ready/row_idx for the bank to send; rd_addr -> rd_data one
// clock later; row_done releases that bank. The ping-pong idea follows the
// document; the row-sized banks are this design's choice.
module pingpong_buf #(
  parameter int IMG_W = 640,
  parameter int IMG_H = 480
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        fifo_rd,
  input  logic        fifo_empty,
  input  logic [16:0] fifo_rdata,
  output logic        row_ready,
  output logic [15:0] row_idx,
  input  logic [$clog2(IMG_W)-1:0] rd_addr,
  output logic [15:0] rd_data,
  input  logic        row_done
);
  localparam int AW = $clog2(IMG_W);
  logic [15:0] mem [2][IMG_W];
  logic        pop_q, wb, rb;
  logic [1:0]  bank_full;
  logic [AW-1:0] wx, wx_eff;
  logic [15:0] wrow, wrow_eff;
  logic [15:0] row_of [2];

  assign fifo_rd = !pop_q && !fifo_empty && !bank_full[wb];
  // a start-of-frame pixel goes to column 0 of row 0
  assign wx_eff   = fifo_rdata[16] ? '0 : wx;
  assign wrow_eff = fifo_rdata[16] ? '0 : wrow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pop_q <= 1'b0; wb <= 1'b0; rb <= 1'b0; bank_full <= '0; wx <= '0; wrow <= '0;
      row_of[0] <= '0; row_of[1] <= '0;
    end else begin
      pop_q <= fifo_rd;
      if (pop_q) begin
        if (wx_eff == AW'(IMG_W - 1)) begin
          bank_full[wb] <= 1'b1;
          row_of[wb]    <= wrow_eff;
          wb            <= ~wb;
          wx            <= '0;
          wrow          <= (wrow_eff == 16'(IMG_H - 1)) ? '0 : wrow_eff + 1'b1;
        end else begin
          wx   <= wx_eff + 1'b1;
          wrow <= wrow_eff;
        end
      end
      if (row_done) begin
        bank_full[rb] <= 1'b0;
        rb <= ~rb;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (pop_q) mem[wb][wx_eff] <= fifo_rdata[15:0];
    rd_data <= mem[rb][rd_addr];
  end

  assign row_ready = bank_full[rb];
  assign row_idx   = row_of[rb];
endmodule
