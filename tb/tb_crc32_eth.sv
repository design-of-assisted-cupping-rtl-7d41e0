// tb_crc32_eth: self-checking test of crc32_eth. Checks the standard check
// value CRC-32("123456789") = 0xCBF43926, the Ethernet residue 0xDEBB20E3
// after appending the complemented CRC low byte first, and random messages
// against a bit-serial shift-register model (one bit per step, LSB first).
`timescale 1ns/1ps
module tb_crc32_eth;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, en = 0;
  logic [7:0] d = 0;
  logic [31:0] crc;
  int checks = 0, failures = 0;
  crc32_eth dut (.clk, .rst_n, .init, .en, .data(d), .crc);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] model(input logic [7:0] m [$]);
    logic [31:0] r;
    logic fb;
    r = 32'hFFFFFFFF;
    foreach (m[i])
      for (int b = 0; b < 8; b++) begin
        fb = r[0] ^ m[i][b];
        r = {1'b0, r[31:1]};
        if (fb) r = r ^ 32'hEDB88320;
      end
    return r;
  endfunction

  task automatic feed(input logic [7:0] m [$]);
    @(negedge clk) init = 1; @(negedge clk) init = 0;
    foreach (m[i]) begin d = m[i]; en = 1; @(negedge clk); end
    en = 0; @(negedge clk);
  endtask

  initial begin
    #100_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] m [$];
    logic [31:0] c;
    repeat (3) @(negedge clk); rst_n = 1;
    m = '{"1", "2", "3", "4", "5", "6", "7", "8", "9"};
    feed(m);
    check(~crc == 32'hCBF43926, $sformatf("check value %h", ~crc));
    c = ~crc;
    m.push_back(c[7:0]); m.push_back(c[15:8]); m.push_back(c[23:16]); m.push_back(c[31:24]);
    feed(m);
    check(crc == 32'hDEBB20E3, $sformatf("residue %h", crc));
    for (int n = 0; n < 20; n++) begin
      m.delete();
      repeat (1 + $urandom % 60) m.push_back(8'($urandom));
      feed(m);
      check(crc == model(m), "random message");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
