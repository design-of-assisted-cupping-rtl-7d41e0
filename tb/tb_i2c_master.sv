// tb_i2c_master: self-checking test of i2c_master against a register-file
// slave model. Does an 8-bit-address write, a 6-byte burst read, a
// 16-bit-address (SCCB-style) write to a second slave, and an access to an
// absent address, which must report nack. Also checks the bus rate: one
// 3-byte write takes 29 bit periods.
`timescale 1ns/1ps
module tb_i2c_master;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req = 0, reg16 = 0, rd = 0;
  logic [6:0] dev = 0;
  logic [15:0] ra = 0;
  logic [7:0] wd = 0;
  logic [2:0] rlen = 1;
  logic busy, done, nack, scl_oe, sda_oe, s1_oe, s2_oe;
  logic [47:0] rdata;
  wire scl = !scl_oe;
  wire sda = !(sda_oe | s1_oe | s2_oe);
  int checks = 0, failures = 0;

  i2c_master #(.CLK_HZ(10_000_000), .I2C_HZ(500_000)) dut (
    .clk, .rst_n, .req, .dev_addr(dev), .reg_addr(ra), .reg16, .rd, .wdata(wd), .rlen,
    .busy, .done, .rdata, .nack, .scl_oe, .sda_oe, .sda_in(sda));
  i2c_slave_model #(.ADDR(7'h76), .REG16(0)) s1 (.scl, .sda, .sda_oe(s1_oe));
  i2c_slave_model #(.ADDR(7'h3C), .REG16(1)) s2 (.scl, .sda, .sda_oe(s2_oe));

  task automatic xfer(input logic [6:0] d, input logic [15:0] r, input logic r16,
                      input logic rnw, input logic [7:0] w, input logic [2:0] n, output longint cyc);
    @(negedge clk);
    dev = d; ra = r; reg16 = r16; rd = rnw; wd = w; rlen = n; req = 1;
    @(negedge clk); req = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #3_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint c;
    int s1_stops0, s2_stops0;
    for (int i = 0; i < 6; i++) s1.regs[8'hF7 + i] = 8'h11 * (i + 1) ^ 8'hA0;
    repeat (5) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    s1_stops0 = s1.stops; s2_stops0 = s2.stops;
    xfer(7'h76, 16'h00F4, 0, 0, 8'h25, 1, c);
    check(!nack, "write acked");
    check(s1.regs[8'hF4] == 8'h25, "byte written to register F4");
    // 3 bytes * 9 bits + start + stop = 29 bit periods of 20 clocks
    check(c >= 28 * 20 && c <= 31 * 20, $sformatf("write duration %0d clocks", c));
    xfer(7'h76, 16'h00F7, 0, 1, 8'h00, 6, c);
    check(!nack, "read acked");
    for (int i = 0; i < 6; i++)
      check(rdata[8*(5-i) +: 8] == (8'h11 * (i + 1) ^ 8'hA0), $sformatf("read byte %0d = %h", i, rdata[8*(5-i) +: 8]));
    xfer(7'h3C, 16'h4300, 1, 0, 8'h61, 1, c);
    check(!nack, "16-bit address write acked");
    check(s2.regs[16'h4300] == 8'h61, "SCCB register 0x4300 written");
    check(s1.regs[8'h43] == 8'h00 && s1.regs[8'h00] == 8'h00, "other slave untouched");
    xfer(7'h50, 16'h0000, 0, 0, 8'h00, 1, c);
    check(nack, "absent device reports nack");
    check(s1.stops - s1_stops0 == 4 && s2.stops - s2_stops0 == 4, $sformatf("every transaction ends with a stop (%0d %0d starts %0d)", s1.stops, s2.stops, s1.starts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
