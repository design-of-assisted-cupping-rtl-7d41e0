// eth_frame_checker: testbench monitor for the image frames on a GMII stream.
// Collects each frame while tx_en is high and checks it independently of the
// transmitter: preamble and delimiter, MAC addresses and type, IPv4 header
// fields and checksum (the one's-complement sum over the header must be
// 0xFFFF), UDP ports and lengths, the 0x5AA5 magic, width and height, the
// payload CRC-32 and the Ethernet FCS (the CRC over the frame including its
// FCS must leave the residue 0xDEBB20E3). Good rows are stored in rows/row_no
// for the testbench to compare; every failed check increments errors.
`timescale 1ns/1ps
module eth_frame_checker #(
  parameter int          IMG_W   = 16,
  parameter int          IMG_H   = 8,
  parameter logic [47:0] SRC_MAC = 48'h00_0A_35_01_02_03,
  parameter logic [47:0] DST_MAC = 48'hFF_FF_FF_FF_FF_FF
) (
  input logic       clk,
  input logic       en,
  input logic [7:0] d
);
  int frames = 0, errors = 0, checks = 0;
  logic [15:0] rows [$][$];
  int row_no [$];
  logic [7:0] fb [$];
  logic en_q = 0;

  function automatic logic [31:0] crc_bits(input logic [7:0] m [$], input int from, input int to);
    logic [31:0] r;
    logic x;
    r = '1;
    for (int i = from; i < to; i++)
      for (int b = 0; b < 8; b++) begin
        x = r[0] ^ m[i][b];
        r = r >> 1;
        if (x) r ^= 32'hEDB88320;
      end
    return r;
  endfunction

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin errors++; if (errors < 20) $display("eth_frame_checker: %s", what); end
  endtask

  task automatic parse();
    int n, plen;
    logic [31:0] s, pc, c;
    logic [15:0] row [$];
    n = fb.size();
    plen = 8 + 2 * IMG_W + 4;
    chk(n == 8 + 14 + 20 + 8 + plen + 4, $sformatf("frame length %0d", n));
    if (n != 8 + 14 + 20 + 8 + plen + 4) return;
    for (int i = 0; i < 7; i++) chk(fb[i] == 8'h55, "preamble");
    chk(fb[7] == 8'hD5, "SFD");
    chk({fb[8], fb[9], fb[10], fb[11], fb[12], fb[13]} == DST_MAC, "destination MAC");
    chk({fb[14], fb[15], fb[16], fb[17], fb[18], fb[19]} == SRC_MAC, "source MAC");
    chk({fb[20], fb[21]} == 16'h0800, "ethertype");
    chk(fb[22] == 8'h45 && fb[30] == 8'd64 && fb[31] == 8'd17, "IPv4 version/TTL/protocol");
    chk({fb[24], fb[25]} == 16'(20 + 8 + plen), "IPv4 total length");
    s = 0;
    for (int i = 22; i < 42; i += 2) s += {fb[i], fb[i+1]};
    s = s[15:0] + (s >> 16); s = s[15:0] + (s >> 16);
    chk(s[15:0] == 16'hFFFF, $sformatf("IPv4 header checksum (sum %h)", s));
    chk({fb[46], fb[47]} == 16'(8 + plen), "UDP length");
    chk({fb[50], fb[51]} == 16'h5AA5, "magic");
    chk({fb[54], fb[55]} == 16'(IMG_W) && {fb[56], fb[57]} == 16'(IMG_H), "resolution");
    pc = ~crc_bits(fb, 50, 58 + 2 * IMG_W);
    chk({fb[58+2*IMG_W+3], fb[58+2*IMG_W+2], fb[58+2*IMG_W+1], fb[58+2*IMG_W]} == pc, "payload CRC-32");
    c = crc_bits(fb, 8, n);
    chk(c == 32'hDEBB20E3, $sformatf("FCS residue %h", c));
    row.delete();
    for (int x = 0; x < IMG_W; x++) row.push_back({fb[58+2*x], fb[59+2*x]});
    rows.push_back(row);
    row_no.push_back({fb[52], fb[53]});
    frames++;
  endtask

  always @(posedge clk) begin
    if (en) fb.push_back(d);
    if (en_q && !en) begin parse(); fb.delete(); end
    en_q <= en;
  end
endmodule
