// bmp280_ctrl: BMP280 pressure/temperature acquisition over I2C.
//
// After reset the controller reads the twelve trimming words dig_T1..dig_T3
// and dig_P1..dig_P9 (registers 0x88-0x9F, little-endian, four 6-byte
// reads). On each trigger it
// writes ctrl_meas (0xF4) = 0x25 (temperature and pressure oversampling x1,
// forced mode), waits MEAS_WAIT_US for the conversion, then burst-reads
// 0xF7-0xFC: the 20-bit raw pressure and the 20-bit raw temperature. The
// temperature is compensated with the sensor's integer formula
//   var1   = ((adc_T>>3) - (T1<<1)) * T2 >> 11
//   var2   = (((adc_T>>4) - T1)^2 >> 12) * T3 >> 14
//   T      = ((var1 + var2) * 5 + 128) >> 8        (0.01 C)
// and the pressure with the sensor's 64-bit integer formula
//   v1 = t_fine - 128000
//   v2 = v1*v1*P6 + (v1*P5 << 17) + (P4 << 35)
//   v1 = (((1 << 47) + (v1*v1*P3 >> 8) + (v1*P2 << 12)) * P1) >> 33
//   q  = ((1048576 - adc_P) << 31 - v2) * 3125 / v1
//   p  = ((q + (P9*(q>>13)^2 >> 25) + (P8*q >> 19)) >> 8) + (P7 << 4)
// giving p in Pa/256; press_pa = p >> 8. The division is a 64-step
// restoring divider on magnitudes (numerator and v1 are positive for any
// reading in the sensor's range); v1 = 0 gives 0. The raw pressure word is
// also passed on (it falls as the pressure rises).
// A trigger that arrives while busy is remembered and served afterwards.
// Interface: trig (pulse); done pulses with temp_c100, press_pa, press_raw and ok
// (every byte acknowledged); I2C pins as in i2c_master.
// Timing: about 3 ms for the trimming reads, then about 0.3 ms + MEAS_WAIT_US
// + 0.9 ms per measurement at 100 kHz, plus 66 clocks of arithmetic.
// The document names the sensor and the bus; the register sequence and the
// compensation come from the sensor data sheet and are this design's reading.
module bmp280_ctrl #(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned I2C_HZ       = 100_000,
  parameter int unsigned MEAS_WAIT_US = 10_000,
  parameter logic [6:0]  DEV_ADDR     = 7'h76
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               trig,
  output logic               busy,
  output logic               done,
  output logic               ok,
  output logic signed [15:0] temp_c100,
  output logic [19:0]        press_raw,
  output logic [19:0]        press_pa,
  output logic               scl_oe,
  output logic               sda_oe,
  input  logic               sda_in
);
  localparam int unsigned WAIT_CYC = (CLK_HZ / 1_000_000) * MEAS_WAIT_US;

  typedef enum logic [3:0] {S_CAL, S_CAL_W, S_IDLE, S_CFG_W, S_WAIT, S_READ_W, S_COMP,
                            S_PDIV, S_PFIN} st_e;
  st_e st;

  logic        req, rd, i2c_busy, i2c_done, nack;
  logic [15:0] reg_addr;
  logic [7:0]  wdata;
  logic [2:0]  rlen;
  logic [47:0] rdata;
  logic        pending, ok_acc;
  logic [$clog2(WAIT_CYC + 2)-1:0] wcnt;
  logic [15:0] dig_t1;
  logic signed [15:0] dig_t2, dig_t3;
  logic [19:0] adc_t, adc_p;
  logic [1:0]  cal_n;                       // which 6-byte trimming block
  logic [15:0] dig_p1;
  logic signed [15:0] dig_p [2:9];
  logic [63:0] dv_num, dv_den, dv_q;        // pressure division
  logic [6:0]  dv_n;
  logic [63:0] dv_rem;                      // always below dv_den

  i2c_master #(.CLK_HZ(CLK_HZ), .I2C_HZ(I2C_HZ)) u_i2c (
    .clk, .rst_n, .req, .dev_addr(DEV_ADDR), .reg_addr, .reg16(1'b0), .rd, .wdata, .rlen,
    .busy(i2c_busy), .done(i2c_done), .rdata, .nack, .scl_oe, .sda_oe, .sda_in);

  // temperature compensation
  logic signed [63:0] adc, t1, var1, var2, dd, t_fine, tc;
  always_comb begin
    adc  = 64'(signed'({1'b0, adc_t}));
    t1   = 64'(signed'({1'b0, dig_t1}));
    var1 = (((adc >>> 3) - (t1 <<< 1)) * 64'(dig_t2)) >>> 11;
    dd   = (adc >>> 4) - t1;
    var2 = (((dd * dd) >>> 12) * 64'(dig_t3)) >>> 14;
    t_fine = var1 + var2;
    tc   = (t_fine * 5 + 128) >>> 8;
  end

  // pressure compensation: numerator and divisor (registered in S_COMP)
  logic signed [63:0] pv1, pv2, pden, pnum;
  always_comb begin
    pv1  = t_fine - 64'sd128000;
    pv2  = pv1 * pv1 * 64'(dig_p[6]);
    pv2  = pv2 + ((pv1 * 64'(dig_p[5])) <<< 17);
    pv2  = pv2 + (64'(dig_p[4]) <<< 35);
    pv1  = ((pv1 * pv1 * 64'(dig_p[3])) >>> 8) + ((pv1 * 64'(dig_p[2])) <<< 12);
    pden = (((64'sd1 <<< 47) + pv1) * 64'(signed'({1'b0, dig_p1}))) >>> 33;
    pnum = (((64'sd1048576 - 64'(signed'({1'b0, adc_p}))) <<< 31) - pv2) * 64'sd3125;
  end

  // final scaling after the division
  logic signed [63:0] pq, pf1, pf2, pfin;
  always_comb begin
    pq   = signed'(dv_q);
    pf1  = (64'(dig_p[9]) * (pq >>> 13) * (pq >>> 13)) >>> 25;
    pf2  = (64'(dig_p[8]) * pq) >>> 19;
    pfin = ((pq + pf1 + pf2) >>> 8) + (64'(dig_p[7]) <<< 4);
  end

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_CAL; req <= 1'b0; rd <= 1'b0; reg_addr <= '0; wdata <= '0; rlen <= 3'd1;
      pending <= 1'b0; ok_acc <= 1'b1; wcnt <= '0; done <= 1'b0; ok <= 1'b0;
      dig_t1 <= '0; dig_t2 <= '0; dig_t3 <= '0; adc_t <= '0; temp_c100 <= '0; press_raw <= '0;
      adc_p <= '0; cal_n <= '0; dig_p1 <= '0; press_pa <= '0;
      for (int i = 2; i <= 9; i++) dig_p[i] <= '0;
      dv_num <= '0; dv_den <= '0; dv_q <= '0; dv_n <= '0; dv_rem <= '0;
    end else begin
      req  <= 1'b0;
      done <= 1'b0;
      if (trig) pending <= 1'b1;
      case (st)
        S_CAL: if (!i2c_busy && !req) begin
          req <= 1'b1; rd <= 1'b1; reg_addr <= 16'h0088 + 16'(cal_n) * 16'd6; rlen <= 3'd6;
          st <= S_CAL_W;
        end
        S_CAL_W: if (i2c_done) begin
          case (cal_n)
            2'd0: begin
              dig_t1 <= {rdata[39:32], rdata[47:40]};
              dig_t2 <= {rdata[23:16], rdata[31:24]};
              dig_t3 <= {rdata[7:0],   rdata[15:8]};
            end
            2'd1: begin
              dig_p1   <= {rdata[39:32], rdata[47:40]};
              dig_p[2] <= {rdata[23:16], rdata[31:24]};
              dig_p[3] <= {rdata[7:0],   rdata[15:8]};
            end
            2'd2: begin
              dig_p[4] <= {rdata[39:32], rdata[47:40]};
              dig_p[5] <= {rdata[23:16], rdata[31:24]};
              dig_p[6] <= {rdata[7:0],   rdata[15:8]};
            end
            default: begin
              dig_p[7] <= {rdata[39:32], rdata[47:40]};
              dig_p[8] <= {rdata[23:16], rdata[31:24]};
              dig_p[9] <= {rdata[7:0],   rdata[15:8]};
            end
          endcase
          if (nack) st <= S_CAL;                 // retry this block
          else begin
            cal_n <= cal_n + 2'd1;
            st <= (cal_n == 2'd3) ? S_IDLE : S_CAL;
          end
        end
        S_IDLE: if (pending) begin
          pending <= 1'b0; ok_acc <= 1'b1;
          req <= 1'b1; rd <= 1'b0; reg_addr <= 16'h00F4; wdata <= 8'h25; st <= S_CFG_W;
        end
        S_CFG_W: if (i2c_done) begin
          ok_acc <= ok_acc & !nack; wcnt <= '0; st <= S_WAIT;
        end
        S_WAIT: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == ($bits(wcnt))'(WAIT_CYC)) begin
            req <= 1'b1; rd <= 1'b1; reg_addr <= 16'h00F7; rlen <= 3'd6; st <= S_READ_W;
          end
        end
        S_READ_W: if (i2c_done) begin
          press_raw <= {rdata[47:32], rdata[31:28]};
          adc_p     <= {rdata[47:32], rdata[31:28]};
          adc_t     <= {rdata[23:8],  rdata[7:4]};
          ok_acc    <= ok_acc & !nack;
          st <= S_COMP;
        end
        S_COMP: begin
          temp_c100 <= 16'(tc);
          dv_num <= pnum[63] ? 64'(-pnum) : 64'(pnum);
          dv_den <= pden[63] ? 64'(-pden) : 64'(pden);
          dv_q   <= '0; dv_rem <= '0; dv_n <= 7'd63;
          st     <= S_PDIV;
        end
        S_PDIV: begin                              // one quotient bit per clock
          if ({dv_rem, dv_num[dv_n[5:0]]} >= {1'b0, dv_den}) begin
            dv_rem <= 64'({dv_rem, dv_num[dv_n[5:0]]} - {1'b0, dv_den});
            dv_q[dv_n[5:0]] <= 1'b1;
          end else dv_rem <= {dv_rem[62:0], dv_num[dv_n[5:0]]};
          if (dv_n == 7'd0) st <= S_PFIN;
          else dv_n <= dv_n - 7'd1;
        end
        S_PFIN: begin
          press_pa <= (dv_den == '0) ? 20'd0 : 20'(pfin >>> 8);
          ok   <= ok_acc;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
