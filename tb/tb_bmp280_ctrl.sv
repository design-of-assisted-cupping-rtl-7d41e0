// tb_bmp280_ctrl: self-checking test of bmp280_ctrl with an I2C register
// model loaded with the BMP280 data-sheet example (dig_T1 = 27504,
// dig_T2 = 26435, dig_T3 = -1000, adc_T = 519888, which is 25.08 C). Checks
// the trimming read, the forced-mode write of 0x25 to 0xF4, the compensated
// temperature 2508, the raw pressure word, the conversion wait, and a
// second trigger with a different raw temperature against a value worked out
// by hand from the data-sheet formula.
`timescale 1ns/1ps
module tb_bmp280_ctrl;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  logic trig = 0, busy, done, ok, scl_oe, sda_oe, s_oe;
  logic [19:0] pa;
  int pk [1:9] = '{36477, -10685, 3024, 2855, 140, -7, 15500, -14600, 6000};
  logic signed [15:0] temp;
  logic [19:0] press;
  wire scl = !scl_oe;
  wire sda = !(sda_oe | s_oe);
  int checks = 0, failures = 0;

  bmp280_ctrl #(.CLK_HZ(10_000_000), .I2C_HZ(500_000), .MEAS_WAIT_US(200)) dut (
    .clk, .rst_n, .trig, .busy, .done, .ok, .temp_c100(temp), .press_raw(press), .press_pa(pa),
    .scl_oe, .sda_oe, .sda_in(sda));
  i2c_slave_model #(.ADDR(7'h76), .REG16(0)) sensor (.scl, .sda, .sda_oe(s_oe));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set_adc(input logic [19:0] p, input logic [19:0] t);
    sensor.regs[8'hF7] = p[19:12]; sensor.regs[8'hF8] = p[11:4]; sensor.regs[8'hF9] = {p[3:0], 4'h0};
    sensor.regs[8'hFA] = t[19:12]; sensor.regs[8'hFB] = t[11:4]; sensor.regs[8'hFC] = {t[3:0], 4'h0};
  endtask

  // reference pressure in Pa from the data sheet's 64-bit formula
  function automatic longint ref_pa(input longint adc_p, input longint t_fine);
    longint v1, v2, p;
    v1 = t_fine - 128000;
    v2 = v1 * v1 * pk[6];
    v2 = v2 + ((v1 * pk[5]) <<< 17);
    v2 = v2 + (longint'(pk[4]) <<< 35);
    v1 = ((v1 * v1 * pk[3]) >>> 8) + ((v1 * pk[2]) <<< 12);
    v1 = (((longint'(1) <<< 47) + v1) * pk[1]) >>> 33;
    if (v1 == 0) return 0;
    p = 1048576 - adc_p;
    p = (((p <<< 31) - v2) * 3125) / v1;
    v1 = (pk[9] * (p >>> 13) * (p >>> 13)) >>> 25;
    v2 = (pk[8] * p) >>> 19;
    p = ((p + v1 + v2) >>> 8) + (longint'(pk[7]) <<< 4);
    return p >>> 8;
  endfunction

  initial begin
    #50_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint t0, t1;
    // 27504 = 0x6B70, 26435 = 0x6743, -1000 = 0xFC18, little-endian
    sensor.regs[8'h88] = 8'h70; sensor.regs[8'h89] = 8'h6B;
    sensor.regs[8'h8A] = 8'h43; sensor.regs[8'h8B] = 8'h67;
    sensor.regs[8'h8C] = 8'h18; sensor.regs[8'h8D] = 8'hFC;
    for (int i = 1; i <= 9; i++) begin
      sensor.regs[8'h8E + 2 * (i - 1)] = 8'(pk[i]);
      sensor.regs[8'h8F + 2 * (i - 1)] = 8'(pk[i] >>> 8);
    end
    set_adc(20'd415148, 20'd519888);
    repeat (5) @(negedge clk); rst_n = 1;
    while (busy) @(negedge clk);
    check(dut.dig_p1 == 16'd36477 && dut.dig_p[9] == 16'sd6000 && dut.dig_p[8] == -16'sd14600, "pressure trimming words");
    check(dut.dig_t1 == 16'd27504 && dut.dig_t2 == 16'sd26435 && dut.dig_t3 == -16'sd1000, "trimming words");
    @(negedge clk) trig = 1; @(negedge clk) trig = 0;
    t0 = $time;
    while (!done) @(negedge clk);
    t1 = $time;
    check(ok, "all bytes acknowledged");
    check(sensor.regs[8'hF4] == 8'h25, "forced mode requested");
    check(temp == 16'sd2508, $sformatf("temperature %0d, expected 2508", temp));
    check(press == 20'd415148, "raw pressure");
    // data sheet example: 100653.27 Pa
    check(pa == 20'd100653, $sformatf("pressure %0d Pa, expected 100653", pa));
    check(ref_pa(415148, 128422) == 100653, "reference model agrees with the data sheet");
    // 200 us wait + write (29 bit periods) + read (84 bit periods) at 2 us each,
    // plus 66 clocks of compensation arithmetic
    check((t1 - t0) >= 200_000 + 112 * 2000 + 6_700 && (t1 - t0) <= 200_000 + 116 * 2000 + 6_900,
          $sformatf("measurement time %0d ns", t1 - t0));
    // adc_T = 500000: var1 = (62500 - 55008) * 26435 >> 11 = 96704,
    // var2 = ((31250 - 27504)^2 >> 12) * -1000 >> 14 = -210, T = (96494*5+128)>>8 = 1885
    set_adc(20'd300000, 20'd500000);
    @(negedge clk) trig = 1; @(negedge clk) trig = 0;
    @(negedge clk);
    @(negedge clk) trig = 1; @(negedge clk) trig = 0;   // arrives while busy: served later
    while (!done) @(negedge clk);
    check(temp == 16'sd1885, $sformatf("temperature %0d, expected 1885", temp));
    check(press == 20'd300000, "raw pressure 2");
    check(longint'(pa) == ref_pa(300000, 96494), $sformatf("pressure 2: %0d Pa, expected %0d", pa, ref_pa(300000, 96494)));
    @(negedge clk);
    while (!done) @(negedge clk);
    check(temp == 16'sd1885, "queued trigger served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
