// gmii_to_rgmii: GMII transmit byte stream to RGMII double-data-rate.
//
// On each rising edge of the 125 MHz transmit clock the byte and control are
// registered; the low nibble and TX_EN are driven while the clock is high,
// the high nibble and TX_EN xor TX_ER while it is low. The high half is
// re-registered on the falling edge so the output multiplexer never switches
// to data that is changing. rgmii_txc is the clock itself; the PHY's internal
// delay centres the data. These are generic flip-flops standing in for an
// FPGA's DDR output registers.
// Timing: a byte presented at rising edge n appears on the pins in the
// clock period that starts at rising edge n+1 (low nibble) and continues at
// the falling edge after it (high nibble). Nibble order and control encoding
// follow the RGMII standard; the document names only the conversion.
module gmii_to_rgmii (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] gmii_txd,
  input  logic       gmii_tx_en,
  input  logic       gmii_tx_er,
  output logic       rgmii_txc,
  output logic [3:0] rgmii_txd,
  output logic       rgmii_tx_ctl
);
  logic [3:0] lo_q, hi_q, hi_n;
  logic       en_q, ctl2_q, ctl2_n;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      lo_q <= '0; hi_q <= '0; en_q <= 1'b0; ctl2_q <= 1'b0;
    end else begin
      lo_q <= gmii_txd[3:0];
      hi_q <= gmii_txd[7:4];
      en_q <= gmii_tx_en;
      ctl2_q <= gmii_tx_en ^ gmii_tx_er;
    end

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) begin
      hi_n <= '0; ctl2_n <= 1'b0;
    end else begin
      hi_n <= hi_q;
      ctl2_n <= ctl2_q;
    end

  assign rgmii_txc    = clk;
  assign rgmii_txd    = clk ? lo_q : hi_n;
  assign rgmii_tx_ctl = clk ? en_q : ctl2_n;
endmodule
