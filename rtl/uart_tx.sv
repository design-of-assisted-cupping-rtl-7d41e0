// uart_tx: 8N1 UART transmitter.
// A start bit, eight data bits LSB first and one stop bit, each CLK_HZ/BAUD
// clocks long. Interface: tx_valid/tx_data accepted when tx_ready; txd idles
// high. Timing: one byte every 10 bit periods (86.8 us at 115200 baud).
// Frame format and rate are this design's choices; the document only names
// the UART link.
module uart_tx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready,
  output logic       txd
);
  localparam int unsigned DIV = CLK_HZ / BAUD;
  logic [$clog2(DIV + 1)-1:0] cnt;
  logic [3:0] nbit;
  logic [9:0] sh;
  logic       busy;

  assign tx_ready = !busy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; nbit <= '0; sh <= '1; busy <= 1'b0; txd <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (tx_valid) begin
        sh <= {1'b1, tx_data, 1'b0}; busy <= 1'b1; cnt <= '0; nbit <= '0;
        txd <= 1'b0;
      end
    end else begin
      if (cnt == ($bits(cnt))'(DIV - 1)) begin
        cnt <= '0;
        if (nbit == 4'd9) busy <= 1'b0;
        else begin
          nbit <= nbit + 4'd1;
          txd  <= sh[nbit + 4'd1];
        end
      end else cnt <= cnt + 1'b1;
    end
  end
endmodule
