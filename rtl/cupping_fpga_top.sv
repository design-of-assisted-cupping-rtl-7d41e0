// cupping_fpga_top: FPGA data-acquisition side of the assisted cupping
// diagnosis system.
//
// Sensor path (system clock, 100 MHz): sync_trigger issues a second pulse and
// per-sensor triggers; dht11_ctrl reads temperature and humidity over the
// single bus and bmp280_ctrl reads temperature and pressure over I2C;
// acq_sync_ctrl buffers both in their own FIFOs behind the trigger timestamp
// and releases them together; temp_fusion compensates the DHT11 temperature
// and fuses it with the BMP280 one; uart_sensor_link frames the record for
// uart_tx and decodes host commands from uart_rx (pressure set point, pump
// enable, zero-bias coefficient); pressure_pid drives the pump PWM from each
// new pressure sample. The record carries the compensated pressure in Pa;
// the PID works on the raw pressure word, which is available without the
// compensation arithmetic and in which the host set point is given.
// Image path (camera pixel clock): sccb_config programs the OV5640 (in the
// system clock domain); dvp_capture assembles RGB565 pixels; the median
// filter and histogram equalisation enhance them; async_fifo carries them,
// with a start-of-frame flag, to the Ethernet clock (125 MHz), where
// pingpong_buf collects rows for udp_image_tx, whose GMII stream
// gmii_to_rgmii turns into RGMII for the PHY.
// Interface: open-drain buses as separate drive-low enables and inputs;
// external chips (sensors, camera, PHY, pump) and the PLL stay outside.
// Status outputs report the mechanisms for bring-up. The partitioning follows
// the document's system block diagram; clocking and the status outputs are
// this design's choices.
module cupping_fpga_top
  import cupping_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned I2C_HZ       = 100_000,
  parameter int unsigned BAUD         = 115_200,
  parameter int unsigned MEAS_WAIT_US = 10_000,
  parameter int unsigned CAM_WAIT_US  = 5_000,
  parameter int          IMG_W        = 640,
  parameter int          IMG_H        = 480,
  parameter int          FIFO_AW      = 11
) (
  input  logic        clk_sys,
  input  logic        cam_pclk,
  input  logic        eth_clk,
  input  logic        rst_n,
  // DHT11 single bus
  output logic        dht_oe,
  input  logic        dht_in,
  // BMP280 I2C
  output logic        bmp_scl_oe,
  output logic        bmp_sda_oe,
  input  logic        bmp_sda_in,
  // OV5640 SCCB and DVP
  output logic        cam_scl_oe,
  output logic        cam_sda_oe,
  input  logic        cam_sda_in,
  input  logic        cam_vsync,
  input  logic        cam_href,
  input  logic [7:0]  cam_data,
  // serial link to the host
  output logic        uart_txd,
  input  logic        uart_rxd,
  // air pump
  output logic        pump_pwm,
  // RGMII transmit to the PHY
  output logic        rgmii_txc,
  output logic [3:0]  rgmii_txd,
  output logic        rgmii_tx_ctl,
  // status
  output logic        pps,
  output logic        cam_cfg_done,
  output logic        lut_valid,
  output logic        lut_overrun,
  output logic        img_fifo_overflow,
  output logic [7:0]  frames_sent,
  output logic [7:0]  cmds_ok,
  output logic [9:0]  pump_duty
);
  // ---------------- resets
  logic rst_sys_n, rst_cam_n, rst_eth_n;
  reset_sync u_rs_sys (.clk(clk_sys),  .rst_n_in(rst_n), .rst_n_out(rst_sys_n));
  reset_sync u_rs_cam (.clk(cam_pclk), .rst_n_in(rst_n), .rst_n_out(rst_cam_n));
  reset_sync u_rs_eth (.clk(eth_clk),  .rst_n_in(rst_n), .rst_n_out(rst_eth_n));

  // ---------------- sensor path
  logic        trig_dht, trig_bmp;
  logic [31:0] timestamp;
  sync_trigger #(.CLK_HZ(CLK_HZ)) u_trig (
    .clk(clk_sys), .rst_n(rst_sys_n), .pps, .trig_dht, .trig_bmp, .timestamp);

  logic               dht_busy, dht_done, dht_ok;
  logic [39:0]        dht_data;
  logic [15:0]        dht_hum;
  logic signed [15:0] dht_temp;
  dht11_ctrl #(.CLK_HZ(CLK_HZ)) u_dht (
    .clk(clk_sys), .rst_n(rst_sys_n), .start(trig_dht), .bus_oe(dht_oe), .bus_in(dht_in),
    .busy(dht_busy), .done(dht_done), .ok(dht_ok), .data(dht_data), .humidity(dht_hum),
    .temp_c100(dht_temp));

  logic               bmp_busy, bmp_done, bmp_ok;
  logic signed [15:0] bmp_temp;
  logic [19:0]        bmp_press, bmp_pa;
  bmp280_ctrl #(.CLK_HZ(CLK_HZ), .I2C_HZ(I2C_HZ), .MEAS_WAIT_US(MEAS_WAIT_US)) u_bmp (
    .clk(clk_sys), .rst_n(rst_sys_n), .trig(trig_bmp), .busy(bmp_busy), .done(bmp_done),
    .ok(bmp_ok), .temp_c100(bmp_temp), .press_raw(bmp_press), .press_pa(bmp_pa),
    .scl_oe(bmp_scl_oe), .sda_oe(bmp_sda_oe), .sda_in(bmp_sda_in));

  logic        rec_valid;
  sensor_rec_t rec, rec_q;
  logic [7:0]  missed_trig;
  acq_sync_ctrl #(.TIMEOUT_CYC(CLK_HZ / 2)) u_acq (
    .clk(clk_sys), .rst_n(rst_sys_n), .trig(pps), .timestamp,
    .dht_done, .dht_ok, .dht_temp, .dht_hum,
    .bmp_done, .bmp_ok, .bmp_temp, .bmp_press(bmp_pa),
    .rec_valid, .rec, .missed_trig);

  always_ff @(posedge clk_sys) if (rec_valid) rec_q <= rec;

  logic               fus_valid;
  logic signed [15:0] t_fused, t_dht_cal, delta_t;
  temp_fusion u_fusion (
    .clk(clk_sys), .rst_n(rst_sys_n), .in_valid(rec_valid), .t_dht(rec.t_dht),
    .t_bmp(rec.t_bmp), .delta_t, .out_valid(fus_valid), .t_fused, .t_dht_cal);

  logic       tx_valid, tx_ready, rx_valid, rx_err;
  logic [7:0] tx_data, rx_data, rx_errors, tx_dropped;
  logic [19:0] setpoint;
  logic        pump_en;
  uart_sensor_link u_link (
    .clk(clk_sys), .rst_n(rst_sys_n), .rec_valid(fus_valid), .rec(rec_q), .t_fused, .t_dht_cal,
    .tx_valid, .tx_data, .tx_ready, .rx_valid, .rx_data,
    .setpoint, .pump_en, .delta_t, .frames_sent, .cmds_ok, .rx_errors, .tx_dropped);
  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_utx (
    .clk(clk_sys), .rst_n(rst_sys_n), .tx_valid, .tx_data, .tx_ready, .txd(uart_txd));
  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_urx (
    .clk(clk_sys), .rst_n(rst_sys_n), .rxd(uart_rxd), .rx_valid, .rx_data, .frame_err(rx_err));

  pressure_pid u_pid (
    .clk(clk_sys), .rst_n(rst_sys_n), .pump_en, .sample_valid(bmp_done && bmp_ok),
    .press_raw(bmp_press), .setpoint, .duty(pump_duty), .pump_pwm);

  // ---------------- image path
  logic cam_nack;
  sccb_config #(.CLK_HZ(CLK_HZ), .I2C_HZ(I2C_HZ), .RESET_WAIT_US(CAM_WAIT_US)) u_sccb (
    .clk(clk_sys), .rst_n(rst_sys_n), .cfg_done(cam_cfg_done), .nack_seen(cam_nack),
    .scl_oe(cam_scl_oe), .sda_oe(cam_sda_oe), .sda_in(cam_sda_in));

  logic        cap_vs, cap_hr, cap_ck, cap_fs;
  logic [15:0] cap_px;
  dvp_capture u_cap (
    .pclk(cam_pclk), .rst_n(rst_cam_n), .cfg_done(cam_cfg_done), .cam_vsync, .cam_href,
    .cam_data, .per_frame_vsync(cap_vs), .per_frame_href(cap_hr), .per_frame_clken(cap_ck),
    .per_img_rgb(cap_px), .frame_start(cap_fs));

  logic        med_vs, med_hr, med_ck;
  logic [15:0] med_px;
  median_filter_rgb #(.IMG_W(IMG_W)) u_median (
    .clk(cam_pclk), .rst_n(rst_cam_n), .per_frame_vsync(cap_vs), .per_frame_href(cap_hr),
    .per_frame_clken(cap_ck), .per_img_rgb(cap_px), .post_frame_vsync(med_vs),
    .post_frame_href(med_hr), .post_frame_clken(med_ck), .post_img_rgb(med_px));

  logic        eq_vs, eq_hr, eq_ck;
  logic [15:0] eq_px;
  hist_eq #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_histeq (
    .clk(cam_pclk), .rst_n(rst_cam_n), .per_frame_vsync(med_vs), .per_frame_href(med_hr),
    .per_frame_clken(med_ck), .per_img_rgb(med_px), .post_frame_vsync(eq_vs),
    .post_frame_href(eq_hr), .post_frame_clken(eq_ck), .post_img_rgb(eq_px),
    .lut_valid, .lut_overrun);

  // start-of-frame flag travels with the first pixel of each frame
  logic sof_pending, afifo_full;
  always_ff @(posedge cam_pclk or negedge rst_cam_n)
    if (!rst_cam_n) begin
      sof_pending <= 1'b1; img_fifo_overflow <= 1'b0;
    end else begin
      if (eq_vs) sof_pending <= 1'b1;
      else if (eq_ck) sof_pending <= 1'b0;
      if (eq_ck && afifo_full) img_fifo_overflow <= 1'b1;
    end

  logic        afifo_rd, afifo_empty;
  logic [16:0] afifo_q;
  async_fifo #(.WIDTH(17), .ADDR_W(FIFO_AW)) u_afifo (
    .wclk(cam_pclk), .wrst_n(rst_cam_n), .wr_en(eq_ck), .wdata({sof_pending, eq_px}),
    .full(afifo_full), .rclk(eth_clk), .rrst_n(rst_eth_n), .rd_en(afifo_rd),
    .rdata(afifo_q), .empty(afifo_empty));

  logic        row_ready, row_done;
  logic [15:0] row_idx, pp_data;
  logic [$clog2(IMG_W)-1:0] pp_addr;
  pingpong_buf #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_pp (
    .clk(eth_clk), .rst_n(rst_eth_n), .fifo_rd(afifo_rd), .fifo_empty(afifo_empty),
    .fifo_rdata(afifo_q), .row_ready, .row_idx, .rd_addr(pp_addr), .rd_data(pp_data),
    .row_done);

  logic [7:0] gmii_txd;
  logic       gmii_tx_en, gmii_tx_er;
  udp_image_tx #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_udp (
    .clk(eth_clk), .rst_n(rst_eth_n), .row_ready, .row_idx, .rd_addr(pp_addr),
    .rd_data(pp_data), .row_done, .gmii_txd, .gmii_tx_en, .gmii_tx_er);

  gmii_to_rgmii u_rgmii (
    .clk(eth_clk), .rst_n(rst_eth_n), .gmii_txd, .gmii_tx_en, .gmii_tx_er,
    .rgmii_txc, .rgmii_txd, .rgmii_tx_ctl);
endmodule
