// uart_rx: 8N1 UART receiver.
// The line is synchronised by two flip-flops. A falling edge starts a byte;
// the start bit is confirmed at its middle and every data bit is sampled at
// its middle, CLK_HZ/BAUD clocks apart. A byte with a low stop bit is dropped
// and flagged in frame_err. Interface: rx_valid pulses with rx_data about
// half a bit after the stop bit's middle. Format and rate are this design's
// choices.
module uart_rx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       frame_err
);
  localparam int unsigned DIV = CLK_HZ / BAUD;
  logic [1:0] s;
  logic [$clog2(DIV + 1)-1:0] cnt;
  logic [3:0] nbit;
  logic [7:0] sh;
  logic       busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= 2'b11; cnt <= '0; nbit <= '0; sh <= '0; busy <= 1'b0;
      rx_valid <= 1'b0; rx_data <= '0; frame_err <= 1'b0;
    end else begin
      s <= {s[0], rxd};
      rx_valid <= 1'b0;
      if (!busy) begin
        if (!s[1]) begin busy <= 1'b1; cnt <= ($bits(cnt))'(DIV / 2); nbit <= '0; end
      end else if (cnt == '0) begin
        cnt <= ($bits(cnt))'(DIV - 1);
        nbit <= nbit + 4'd1;
        if (nbit == 4'd0) begin
          if (s[1]) busy <= 1'b0;              // glitch, not a start bit
        end else if (nbit <= 4'd8) sh <= {s[1], sh[7:1]};
        else begin
          busy <= 1'b0;
          if (s[1]) begin rx_valid <= 1'b1; rx_data <= sh; end
          else frame_err <= 1'b1;
        end
      end else cnt <= cnt - 1'b1;
    end
  end
endmodule
