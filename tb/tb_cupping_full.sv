// tb_cupping_full: end-to-end test of cupping_fpga_top with every parameter
// at its default: 100 MHz system clock, 100 kHz I2C/SCCB, 115200 baud,
// 10 ms BMP280 conversion wait, 5 ms camera reset wait, 640 x 480 image.
// The camera pixel clock is 50 MHz and the Ethernet clock 125 MHz.
// cupping_env supplies the sensors, camera (three constant-colour frames),
// host and PHY side and checks the pins: one sensor record over the UART
// with the expected fused and calibrated temperatures, the accepted host
// commands, and 960 UDP rows (frames two and three) with correct headers,
// checksums and pixels. This file adds the status-pin checks. About 90 ms of
// simulated time.
`timescale 1ns/1ps
module tb_cupping_full;
  logic clk_sys = 0, cam_pclk = 0, eth_clk = 0, rst_n = 1;
  always #5  clk_sys  = ~clk_sys;
  always #10 cam_pclk = ~cam_pclk;
  always #4  eth_clk  = ~eth_clk;

  logic dht_oe, dht_in, bmp_scl_oe, bmp_sda_oe, bmp_sda_in, cam_scl_oe, cam_sda_oe, cam_sda_in;
  logic cam_vsync, cam_href, uart_txd, uart_rxd, pump_pwm, rgmii_txc, rgmii_tx_ctl;
  logic [7:0] cam_data, frames_sent, cmds_ok;
  logic [3:0] rgmii_txd;
  logic [9:0] pump_duty;
  logic pps, cam_cfg_done, lut_valid, lut_overrun, img_fifo_overflow, done;
  int checks = 0, failures = 0;

  cupping_fpga_top dut (.*);
  cupping_env #(.BAUD(115_200), .IMG_W(640), .IMG_H(480), .N_FRAMES(3), .VBLANK(4000), .MAX_MS(200)) env (.*);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_pps = 0;
  always @(posedge clk_sys) if (pps && rst_n) n_pps++;

  initial begin
    #300ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #1 rst_n = 0;        // a falling edge clears every reset synchroniser at once
    #5000 rst_n = 1;     // several cycles of the slowest clock
    wait (done);
    check(n_pps >= 1, "second pulse");
    check(frames_sent >= 1, "UART sensor frame");
    check(cmds_ok == 3, $sformatf("host commands accepted: %0d", cmds_ok));
    check(pump_duty > 0, "PID drives the pump");
    check(cam_cfg_done, "camera configured");
    check(lut_valid && !lut_overrun && !img_fifo_overflow, "LUT valid, no overrun or overflow");
    $display("udp rows=%0d at %0t", env.u_mon.frames, $realtime);
    $display("TB_RESULT checks=%0d failures=%0d", checks + env.checks, failures + env.errors);
    $finish;
  end
endmodule
