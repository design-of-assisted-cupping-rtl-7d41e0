// udp_image_tx: one Ethernet/IPv4/UDP frame per image row on a GMII byte
// stream.
//
// When a row is ready the block sends, one byte per clock: 7 preamble bytes
// and the start delimiter, the MAC header (type 0x0800), a 20-byte IPv4
// header (TTL 64, protocol 17, don't-fragment, identification counting frames,
// header checksum computed here), an 8-byte UDP header (checksum 0), and the
// payload
//   frame header : 16-bit 0x5AA5, 16-bit row number
//   resolution   : 16-bit width, 16-bit height
//   pixel data   : IMG_W RGB565 pixels, high byte first
//   CRC-32       : over the payload bytes above, complemented, low byte first
// followed by the Ethernet FCS and 12 idle clocks of inter-frame gap.
// Multi-byte header fields are big-endian (network order).
// Interface: row_ready/row_idx from the ping-pong buffer; rd_addr is
// presented one clock before the pixel is needed (registered RAM read);
// row_done pulses once the last pixel has been read. gmii_* are registered;
// gmii_tx_er is held low, as this transmitter never aborts a frame.
// Timing: a frame of IMG_W = 640 is 1346 bytes plus the gap.
// The payload field order and CRC-32 follow the document; the magic word, row
// number, addresses, ports and byte orders are this design's choices.
module udp_image_tx #(
  parameter int          IMG_W    = 640,
  parameter int          IMG_H    = 480,
  parameter logic [47:0] SRC_MAC  = 48'h00_0A_35_01_02_03,
  parameter logic [47:0] DST_MAC  = 48'hFF_FF_FF_FF_FF_FF,
  parameter logic [31:0] SRC_IP   = {8'd192, 8'd168, 8'd1, 8'd10},
  parameter logic [31:0] DST_IP   = {8'd192, 8'd168, 8'd1, 8'd100},
  parameter logic [15:0] SRC_PORT = 16'd1234,
  parameter logic [15:0] DST_PORT = 16'd1234
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        row_ready,
  input  logic [15:0] row_idx,
  output logic [$clog2(IMG_W)-1:0] rd_addr,
  input  logic [15:0] rd_data,
  output logic        row_done,
  output logic [7:0]  gmii_txd,
  output logic        gmii_tx_en,
  output logic        gmii_tx_er
);
  import cupping_pkg::IMG_MAGIC;
  localparam int AW        = $clog2(IMG_W);
  localparam int PAY_START = 50;
  localparam int PIX_START = 58;
  localparam int PCRC      = PIX_START + 2 * IMG_W;
  localparam int FCS_S     = PCRC + 4;
  localparam int FEND      = FCS_S + 4;
  localparam int IFG       = 12;
  localparam int CNTW      = $clog2(FEND + IFG + 1);
  localparam logic [15:0] UDP_LEN = 16'(8 + PCRC + 4 - PAY_START);
  localparam logic [15:0] IP_LEN  = UDP_LEN + 16'd20;

  logic [CNTW-1:0] cnt;
  logic            busy;
  logic [15:0]     ip_id, row_q;
  logic [31:0]     crc_p, crc_f;
  logic [7:0]      cur;

  function automatic logic [15:0] ip_csum(input logic [15:0] id);
    logic [19:0] s;
    s = 20'h04500 + 20'(IP_LEN) + 20'(id) + 20'h04000 + 20'h04011 +
        20'(SRC_IP[31:16]) + 20'(SRC_IP[15:0]) + 20'(DST_IP[31:16]) + 20'(DST_IP[15:0]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    return ~s[15:0];
  endfunction

  logic [15:0] csum;
  assign csum = ip_csum(ip_id);

  always_comb begin
    int i;
    i = int'(cnt);
    cur = 8'h00;
    if (i < 7) cur = 8'h55;
    else if (i == 7) cur = 8'hD5;
    else if (i < 14) cur = DST_MAC[8*(13-i) +: 8];
    else if (i < 20) cur = SRC_MAC[8*(19-i) +: 8];
    else if (i == 20) cur = 8'h08;
    else if (i == 21) cur = 8'h00;
    else if (i < 42) begin
      case (i - 22)
        0: cur = 8'h45;           1: cur = 8'h00;
        2: cur = IP_LEN[15:8];    3: cur = IP_LEN[7:0];
        4: cur = ip_id[15:8];     5: cur = ip_id[7:0];
        6: cur = 8'h40;           7: cur = 8'h00;
        8: cur = 8'd64;           9: cur = 8'd17;
        10: cur = csum[15:8];     11: cur = csum[7:0];
        12: cur = SRC_IP[31:24];  13: cur = SRC_IP[23:16];
        14: cur = SRC_IP[15:8];   15: cur = SRC_IP[7:0];
        16: cur = DST_IP[31:24];  17: cur = DST_IP[23:16];
        18: cur = DST_IP[15:8];   default: cur = DST_IP[7:0];
      endcase
    end else if (i < 50) begin
      case (i - 42)
        0: cur = SRC_PORT[15:8];  1: cur = SRC_PORT[7:0];
        2: cur = DST_PORT[15:8];  3: cur = DST_PORT[7:0];
        4: cur = UDP_LEN[15:8];   5: cur = UDP_LEN[7:0];
        default: cur = 8'h00;
      endcase
    end else if (i < PIX_START) begin
      case (i - 50)
        0: cur = IMG_MAGIC[15:8];    1: cur = IMG_MAGIC[7:0];
        2: cur = row_q[15:8];        3: cur = row_q[7:0];
        4: cur = 8'(IMG_W >> 8);     5: cur = 8'(IMG_W);
        6: cur = 8'(IMG_H >> 8);     default: cur = 8'(IMG_H);
      endcase
    end else if (i < PCRC) cur = ((i - PIX_START) % 2 == 0) ? rd_data[15:8] : rd_data[7:0];
    else if (i < FCS_S) cur = ~crc_p[8*(i-PCRC) +: 8];
    else if (i < FEND)  cur = ~crc_f[8*(i-FCS_S) +: 8];
  end

  // pixel address one byte ahead of use
  always_comb begin
    int o;
    o = int'(cnt) + 1 - PIX_START;
    rd_addr = (o >= 0 && o < 2 * IMG_W) ? AW'(o / 2) : '0;
  end

  wire in_pay = busy && int'(cnt) >= PAY_START && int'(cnt) < PCRC;
  wire in_fcs = busy && int'(cnt) >= 8 && int'(cnt) < FCS_S;

  crc32_eth u_crc_pay (.clk, .rst_n, .init(!busy), .en(in_pay), .data(cur), .crc(crc_p));
  crc32_eth u_crc_fcs (.clk, .rst_n, .init(!busy), .en(in_fcs), .data(cur), .crc(crc_f));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; busy <= 1'b0; ip_id <= '0; row_q <= '0; row_done <= 1'b0;
      gmii_txd <= '0; gmii_tx_en <= 1'b0;
    end else begin
      row_done <= 1'b0;
      gmii_tx_en <= 1'b0;
      gmii_txd <= 8'h00;
      if (!busy) begin
        cnt <= '0;
        if (row_ready) begin
          busy <= 1'b1; row_q <= row_idx;
        end
      end else begin
        if (int'(cnt) < FEND) begin
          gmii_txd <= cur;
          gmii_tx_en <= 1'b1;
        end
        if (int'(cnt) == PCRC - 1) row_done <= 1'b1;
        if (int'(cnt) == FEND + IFG - 1) begin
          busy <= 1'b0; ip_id <= ip_id + 1'b1;
        end else cnt <= cnt + 1'b1;
      end
    end
  end
  assign gmii_tx_er = 1'b0;
endmodule
