// tb_sccb_config: self-checking test of sccb_config with an SCCB (16-bit
// address) register model at device 0x3C. Checks that the 13 table entries
// are written in order with the expected addresses and data, that the pause
// after the software reset is kept, and that cfg_done rises and stays high.
`timescale 1ns/1ps
module tb_sccb_config;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;                // 10 MHz
  logic cfg_done, nack_seen, scl_oe, sda_oe, s_oe;
  wire scl = !scl_oe;
  wire sda = !(sda_oe | s_oe);
  int checks = 0, failures = 0;

  sccb_config #(.CLK_HZ(10_000_000), .I2C_HZ(500_000), .RESET_WAIT_US(300)) dut (
    .clk, .rst_n, .cfg_done, .nack_seen, .scl_oe, .sda_oe, .sda_in(sda));
  i2c_slave_model #(.ADDR(7'h3C), .REG16(1)) cam (.scl, .sda, .sda_oe(s_oe));

  logic [23:0] expected [13] = '{24'h3103_11, 24'h3008_82, 24'h3008_42, 24'h3103_03,
    24'h3017_FF, 24'h3018_FF, 24'h3808_02, 24'h3809_80, 24'h380A_01, 24'h380B_E0,
    24'h4300_61, 24'h501F_01, 24'h3008_02};

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  realtime t_reset_done, t_next_start;
  initial begin
    #20_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (5) @(negedge clk); rst_n = 1;
    wait (cam.wlog.size() == 2); t_reset_done = $realtime;
    wait (cam.starts == 3); t_next_start = $realtime;
    check(t_next_start - t_reset_done >= 300_000, $sformatf("reset pause %0t", t_next_start - t_reset_done));
    wait (cfg_done);
    check(cam.wlog.size() == 13, $sformatf("%0d writes", cam.wlog.size()));
    for (int i = 0; i < 13 && i < cam.wlog.size(); i++)
      check(cam.wlog[i] == expected[i], $sformatf("entry %0d: %h", i, cam.wlog[i]));
    check(!nack_seen, "all writes acknowledged");
    check(cam.regs[16'h4300] == 8'h61 && cam.regs[16'h3808] == 8'h02 && cam.regs[16'h3809] == 8'h80,
          "RGB565 640-wide output programmed");
    repeat (5000) @(negedge clk);
    check(cfg_done && cam.wlog.size() == 13, "stays done, no further writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
