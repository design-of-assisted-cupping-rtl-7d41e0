// tb_cupping_top: end-to-end test of cupping_fpga_top at reduced size.
// The top runs with a 10 MHz system clock (CLK_HZ matched, so all protocol
// timings are real), a 100 kbaud UART, a 32 x 8 image, a 1 MHz camera pixel
// clock and a 125 MHz Ethernet clock, with a short camera reset wait.
// cupping_env supplies the sensors, camera, host and PHY side and checks the
// pins. This file also counts, through the hierarchy, that each internal
// mechanism happened at least once: second pulse, DHT11 read, BMP280 read,
// aligned record with matching timestamps, fusion, UART frame, host commands,
// PID drive, camera configuration, median filter output, histogram LUT
// update, suppressed first frame, async FIFO crossing with start-of-frame,
// both ping-pong banks, UDP rows. A mechanism that never happened is a
// failure.
`timescale 1ns/1ps
module tb_cupping_top;
  localparam int W = 32, H = 8;
  logic clk_sys = 0, cam_pclk = 0, eth_clk = 0, rst_n = 1;
  always #50  clk_sys  = ~clk_sys;
  always #500 cam_pclk = ~cam_pclk;
  always #4   eth_clk  = ~eth_clk;

  logic dht_oe, dht_in, bmp_scl_oe, bmp_sda_oe, bmp_sda_in, cam_scl_oe, cam_sda_oe, cam_sda_in;
  logic cam_vsync, cam_href, uart_txd, uart_rxd, pump_pwm, rgmii_txc, rgmii_tx_ctl;
  logic [7:0] cam_data, frames_sent, cmds_ok;
  logic [3:0] rgmii_txd;
  logic [9:0] pump_duty;
  logic pps, cam_cfg_done, lut_valid, lut_overrun, img_fifo_overflow, done;
  int checks = 0, failures = 0;

  cupping_fpga_top #(.CLK_HZ(10_000_000), .I2C_HZ(100_000), .BAUD(100_000), .MEAS_WAIT_US(10_000),
                     .CAM_WAIT_US(1_000), .IMG_W(W), .IMG_H(H), .FIFO_AW(6)) dut (.*);
  cupping_env #(.BAUD(100_000), .IMG_W(W), .IMG_H(H), .N_FRAMES(4), .VBLANK(4000), .MAX_MS(100)) env (.*);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_pps = 0, n_dht = 0, n_bmp = 0, n_rec = 0, n_fus = 0, n_pwm = 0, n_med = 0, n_lut = 0;
  int n_eq_f1 = 0, n_eq = 0, n_sof = 0, n_bank0 = 0, n_bank1 = 0, n_vs = 0;
  logic pwm_q = 0, lut_q = 0;
  always @(posedge clk_sys) if (rst_n) begin
    if (pps) n_pps++;
    if (dut.dht_done && dut.dht_ok) n_dht++;
    if (dut.bmp_done && dut.bmp_ok) n_bmp++;
    if (dut.rec_valid && dut.rec.ts_match && dut.rec.dht_ok && dut.rec.bmp_ok) n_rec++;
    if (dut.fus_valid) n_fus++;
    if (pump_pwm && !pwm_q) n_pwm++;
    pwm_q <= pump_pwm;
  end
  always @(posedge cam_pclk) if (rst_n) begin
    if (dut.med_ck) n_med++;
    if (lut_valid && !lut_q) n_lut++;
    lut_q <= lut_valid;
    if (dut.cap_fs) n_vs++;
    if (dut.eq_ck) begin if (n_vs <= 1) n_eq_f1++; else n_eq++; end
  end
  always @(posedge eth_clk) if (rst_n && dut.u_pp.pop_q) begin
    if (dut.afifo_q[16]) n_sof++;
    if (dut.u_pp.wb) n_bank1++; else n_bank0++;
  end

  initial begin
    #150ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #1 rst_n = 0;        // a falling edge clears every reset synchroniser at once
    #5000 rst_n = 1;     // several cycles of the slowest clock
    wait (done);
    check(n_pps >= 1, "second pulse");
    check(n_dht >= 1, "DHT11 read");
    check(n_bmp >= 1, "BMP280 read");
    check(n_rec >= 1, "aligned record with matching timestamps");
    check(n_fus >= 1, "temperature fusion");
    check(frames_sent >= 1, "UART sensor frame");
    check(cmds_ok == 3, $sformatf("host commands accepted: %0d", cmds_ok));
    check(pump_duty > 0 && n_pwm >= 1, $sformatf("PID drives the pump (duty %0d)", pump_duty));
    check(cam_cfg_done && !dut.cam_nack, "camera configured");
    check(n_med >= 4 * W * H, "median filter output");
    check(n_lut >= 1, "histogram LUT built");
    check(n_eq_f1 == 0 && n_eq == 3 * W * H, $sformatf("first frame suppressed (%0d/%0d)", n_eq_f1, n_eq));
    check(n_sof == 3, $sformatf("start-of-frame crossed the async FIFO %0d times", n_sof));
    check(n_bank0 == n_bank1 && n_bank0 > 0, "both ping-pong banks used");
    check(!lut_overrun && !img_fifo_overflow, "no overrun or overflow");
    check(env.u_mon.frames == 3 * H, "UDP rows");
    $display("mechanisms: pps=%0d dht=%0d bmp=%0d rec=%0d fus=%0d uart=%0d cmds=%0d pwm=%0d med=%0d lut=%0d sof=%0d udp=%0d",
             n_pps, n_dht, n_bmp, n_rec, n_fus, frames_sent, cmds_ok, n_pwm, n_med, n_lut, n_sof, env.u_mon.frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks + env.checks, failures + env.errors);
    $finish;
  end
endmodule
