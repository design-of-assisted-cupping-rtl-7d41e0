// crc32_eth: byte-serial IEEE 802.3 CRC-32.
// The register starts at all ones on init; every clock with en folds one data
// byte in, least significant bit first (reflected polynomial 0xEDB88320).
// crc is the running register; the value to transmit is its complement, sent
// least significant byte first. One byte per clock, no latency beyond the
// register. The polynomial and conventions are the Ethernet standard's.
module crc32_eth (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  data,
  output logic [31:0] crc
);
  import cupping_pkg::crc32_byte;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    crc <= '1;
    else if (init) crc <= '1;
    else if (en)   crc <= crc32_byte(crc, data);
endmodule
