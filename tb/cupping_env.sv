// cupping_env: board model around cupping_fpga_top for the system testbenches.
// Not synthesizable. It contains every external part the FPGA talks to and
// checks what comes back on the pins:
//  - a DHT11 model (55.0 %RH, 26.3 C) on the single bus,
//  - a BMP280 register model at I2C address 0x76 with the data sheet trimming
//    words and raw readings (temperature 2508 = 25.08 C, pressure 100653 Pa),
//  - an OV5640 register model at SCCB address 0x3C with 16-bit addresses,
//  - a DVP camera that, once the configuration is done, sends N_FRAMES
//    frames of IMG_W x IMG_H pixels of one constant RGB565 colour,
//  - a host computer on the UART that sends three control frames (set point,
//    pump enable, zero-bias coefficient 0.30 C) and decodes the 17-byte
//    sensor frames,
//  - an RGMII receiver feeding eth_frame_checker.
// With one colour in every frame, the median filter passes it unchanged and
// the equalisation of frame n (using frame n-1's histogram) maps its
// luminance to 255, so every pixel in every UDP row is known in advance.
// The first frame has no histogram yet and must not be sent at all, so the
// expected number of UDP rows is (N_FRAMES-1)*IMG_H.
// The parent starts nothing: stimulus begins after rst_n rises; 'done' goes
// high once everything expected has arrived (or after MAX_MS). checks and
// errors count the checks made here.
`timescale 1ns/1ps
module cupping_env #(
  parameter int  BAUD     = 115_200,
  parameter int  IMG_W    = 640,
  parameter int  IMG_H    = 480,
  parameter int  N_FRAMES = 3,
  parameter int  VBLANK   = 4000,      // camera clocks of vertical blanking
  parameter int  HBLANK   = 16,        // camera clocks between rows
  parameter int  MAX_MS   = 200
) (
  input  logic       rst_n,
  input  logic       cam_pclk,
  input  logic       eth_clk,
  input  logic       dht_oe,
  output logic       dht_in,
  input  logic       bmp_scl_oe, bmp_sda_oe,
  output logic       bmp_sda_in,
  input  logic       cam_scl_oe, cam_sda_oe,
  output logic       cam_sda_in,
  output logic       cam_vsync, cam_href,
  output logic [7:0] cam_data,
  input  logic       uart_txd,
  output logic       uart_rxd,
  input  logic       rgmii_txc,
  input  logic [3:0] rgmii_txd,
  input  logic       rgmii_tx_ctl,
  input  logic       cam_cfg_done,
  output logic       done
);
  localparam realtime BIT_NS = 1.0e9 / BAUD;
  localparam logic [15:0] COLOUR = {5'd20, 6'd40, 5'd12};
  int checks = 0, errors = 0;
  int uart_frames = 0, uart_good = 0, frames_out = 0;
  logic [7:0] last_frame [17];

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin errors++; if (errors < 20) $display("cupping_env: %s", what); end
  endtask

  // ---------------- DHT11
  logic dht_dev;
  assign dht_in = !(dht_oe || dht_dev);
  dht11_model #(.US(1000)) u_dht (.line(dht_in), .frame({8'd55, 8'd0, 8'd26, 8'd3, 8'd84}),
                                  .mute(1'b0), .dev_oe(dht_dev));

  // ---------------- BMP280 and OV5640 register models
  logic bmp_dev, cam_dev;
  assign bmp_sda_in = !(bmp_sda_oe || bmp_dev);
  assign cam_sda_in = !(cam_sda_oe || cam_dev);
  i2c_slave_model #(.ADDR(7'h76), .REG16(1'b0)) u_bmp (.scl(!bmp_scl_oe), .sda(bmp_sda_in), .sda_oe(bmp_dev));
  i2c_slave_model #(.ADDR(7'h3C), .REG16(1'b1)) u_cam (.scl(!cam_scl_oe), .sda(cam_sda_in), .sda_oe(cam_dev));
  int pk [1:9] = '{36477, -10685, 3024, 2855, 140, -7, 15500, -14600, 6000};
  initial begin
    #1;
    u_bmp.regs[8'h88] = 8'h70; u_bmp.regs[8'h89] = 8'h6B;   // dig_T1 = 27504
    u_bmp.regs[8'h8A] = 8'h43; u_bmp.regs[8'h8B] = 8'h67;   // dig_T2 = 26435
    u_bmp.regs[8'h8C] = 8'h18; u_bmp.regs[8'h8D] = 8'hFC;   // dig_T3 = -1000
    for (int i = 1; i <= 9; i++) begin                        // dig_P1..P9
      u_bmp.regs[8'h8E + 2 * (i - 1)] = 8'(pk[i]);
      u_bmp.regs[8'h8F + 2 * (i - 1)] = 8'(pk[i] >>> 8);
    end
    {u_bmp.regs[8'hF7], u_bmp.regs[8'hF8], u_bmp.regs[8'hF9]} = {20'd415148, 4'h0};
    {u_bmp.regs[8'hFA], u_bmp.regs[8'hFB], u_bmp.regs[8'hFC]} = {20'd519888, 4'h0};
  end

  // ---------------- host UART
  initial uart_rxd = 1'b1;
  task automatic host_byte(input logic [7:0] b);
    uart_rxd = 1'b0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; #(BIT_NS); end
    uart_rxd = 1'b1; #(BIT_NS);
  endtask
  task automatic host_cmd(input logic [7:0] cmd, input logic [15:0] v);
    logic [7:0] s;
    s = 8'hAA + 8'h55 + cmd + v[15:8] + v[7:0];
    host_byte(8'hAA); host_byte(8'h55); host_byte(cmd); host_byte(v[15:8]); host_byte(v[7:0]);
    host_byte(s);
    #(3 * BIT_NS);
  endtask

  // 17-byte sensor frames from the FPGA
  initial begin
    logic [7:0] b, s;
    logic [7:0] f [17];
    forever begin
      int n;
      n = 0;
      while (n < 17) begin
        @(negedge uart_txd);
        #(BIT_NS / 2);
        if (uart_txd) continue;
        for (int i = 0; i < 8; i++) begin #(BIT_NS); b[i] = uart_txd; end
        #(BIT_NS);
        chk(uart_txd == 1'b1, "UART stop bit");
        if (n == 0 && b != 8'hAA) continue;
        if (n == 1 && b != 8'h55) begin n = 0; continue; end
        f[n] = b; n++;
      end
      s = 0;
      for (int i = 0; i < 16; i++) s += f[i];
      uart_frames++;
      chk(s == f[16], "sensor frame checksum");
      if (s == f[16]) uart_good++;
      last_frame = f;
    end
  end

  // ---------------- DVP camera
  initial begin cam_vsync = 0; cam_href = 0; cam_data = 0; end
  task automatic cam_frame();
    @(negedge cam_pclk) cam_vsync = 1; repeat (8) @(negedge cam_pclk);
    cam_vsync = 0; repeat (16) @(negedge cam_pclk);
    for (int y = 0; y < IMG_H; y++) begin
      cam_href = 1;
      for (int x = 0; x < IMG_W; x++) begin
        cam_data = COLOUR[15:8]; @(negedge cam_pclk);
        cam_data = COLOUR[7:0];  @(negedge cam_pclk);
      end
      cam_href = 0; repeat (HBLANK) @(negedge cam_pclk);
    end
    repeat (VBLANK) @(negedge cam_pclk);
  endtask

  // ---------------- RGMII receiver
  logic [7:0] g_d = 0;
  logic       g_en = 0, g_er = 0;
  logic [3:0] lo;
  logic       c1;
  always @(posedge rgmii_txc) begin #2; lo = rgmii_txd; c1 = rgmii_tx_ctl; end
  always @(negedge rgmii_txc) begin #2; g_d = {rgmii_txd, lo}; g_en = c1; g_er = c1 ^ rgmii_tx_ctl; end
  eth_frame_checker #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_mon (.clk(eth_clk), .en(g_en), .d(g_d));
  int rgmii_err = 0;
  always @(posedge eth_clk) if (g_er) rgmii_err++;

  // expected output colour: luminance 255 with the input's chroma
  function automatic int clamp(input int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction
  function automatic int asr8(input int v);
    return v >>> 8;
  endfunction
  function automatic logic [15:0] expected_pixel();
    int r, g, b, cb, cr;
    r = {COLOUR[15:11], COLOUR[15:13]};
    g = {COLOUR[10:5], COLOUR[10:9]};
    b = {COLOUR[4:0], COLOUR[4:2]};
    cb = (128 * b - 85 * g - 43 * r + 32768) / 256;
    cr = (128 * r - 107 * g - 21 * b + 32768) / 256;
    r = clamp(255 + asr8(359 * (cr - 128)));
    g = clamp(255 - asr8(88 * (cb - 128) + 183 * (cr - 128)));
    b = clamp(255 + asr8(454 * (cb - 128)));
    return {5'(r >> 3), 6'(g >> 2), 5'(b >> 3)};
  endfunction

  // ---------------- stimulus and final checks
  realtime t_second_frame = 0, t_first_udp = 0;
  always @(posedge g_en) if (t_first_udp == 0) t_first_udp = $realtime;

  initial begin
    logic [15:0] px;
    int bad;
    done = 0;
    @(posedge rst_n);
    #(20 * BIT_NS);
    fork
      begin
        host_cmd(8'h01, 16'h7000);      // set point above the current raw reading
        host_cmd(8'h02, 16'h0001);      // pump on
        host_cmd(8'h03, 16'd30);        // DHT11 zero bias 0.30 C
      end
      begin
        wait (cam_cfg_done);
        repeat (10) @(negedge cam_pclk);   // let the capture side see cfg_done
        for (int f = 0; f < N_FRAMES; f++) begin
          if (f == 1) t_second_frame = $realtime;
          cam_frame();
        end
      end
    join
    fork
      wait (uart_frames >= 1 && u_mon.frames + u_mon.errors >= (N_FRAMES - 1) * IMG_H);
      #(MAX_MS * 1ms);
    join_any
    #(40 * BIT_NS);
    // UART sensor frame contents
    chk(uart_frames >= 1 && uart_good == uart_frames, $sformatf("%0d UART frames, %0d good", uart_frames, uart_good));
    if (uart_frames >= 1) begin
      int tf;
      tf = $signed({last_frame[6], last_frame[7]});
      chk(tf >= 2512 && tf <= 2514, $sformatf("fused temperature %0d", tf));
      chk({last_frame[8], last_frame[9]} == 16'd2600, "calibrated DHT11 temperature (26.30 - 0.30)");
      chk({last_frame[10], last_frame[11]} == {8'd55, 8'd0}, "humidity");
      chk({last_frame[12], last_frame[13], last_frame[14]} == 24'd100653, "pressure 100653 Pa");
      chk(last_frame[15] == 8'h07, $sformatf("status %h (dht_ok, bmp_ok, ts_match)", last_frame[15]));
    end
    // camera configuration
    chk(u_cam.regs[16'h4300] == 8'h61 && u_cam.regs[16'h3808] == 8'h02 && u_cam.regs[16'h3809] == 8'h80,
        "camera registers written (RGB565, 640 wide)");
    chk(u_bmp.regs[8'hF4] == 8'h25, "BMP280 forced measurement requested");
    // image stream
    chk(u_mon.errors == 0, $sformatf("%0d Ethernet frame errors", u_mon.errors));
    chk(u_mon.frames == (N_FRAMES - 1) * IMG_H,
        $sformatf("%0d UDP rows, expected %0d", u_mon.frames, (N_FRAMES - 1) * IMG_H));
    chk(t_first_udp > t_second_frame, "nothing sent during the first frame");
    chk(rgmii_err == 0, "no TX_ER");
    px = expected_pixel();
    bad = 0;
    for (int r = 0; r < u_mon.frames; r++) begin
      if (u_mon.row_no[r] != r % IMG_H) bad++;
      for (int x = 0; x < IMG_W; x++) if (u_mon.rows[r][x] != px) bad++;
    end
    chk(bad == 0, $sformatf("%0d wrong row numbers or pixels (expected %h)", bad, px));
    checks += u_mon.checks;
    errors += u_mon.errors;
    done = 1;
  end
endmodule
