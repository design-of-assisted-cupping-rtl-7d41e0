// sccb_config: OV5640 start-up configuration over SCCB.
//
// After reset the block walks a register table and writes each entry with
// i2c_master in SCCB mode (device 0x3C, 16-bit register address, one data
// byte). After the software-reset entry it waits RESET_WAIT_US before going
// on. When the table is done cfg_done goes high and stays high.
// The table is a minimal start-up set taken from the sensor data sheet:
// clock from pad, software reset, power down during setup, PLL clock, DVP
// output enables, 640 x 480 output window, RGB565 output format, ISP RGB
// format, wake up. Sensor-specific tuning (exposure, white balance, PLL
// dividers) is left at the sensor's defaults.
// Interface: cfg_done; nack_seen is set if any write was not acknowledged
// (SCCB allows that, so it only informs). I2C pins as in i2c_master.
// Timing: about 0.4 ms per entry at 100 kHz plus the reset wait.
// The document says SCCB is handled by a customised I2C bus; the table is
// this design's choice.
module sccb_config #(
  parameter int unsigned CLK_HZ        = 100_000_000,
  parameter int unsigned I2C_HZ        = 100_000,
  parameter int unsigned RESET_WAIT_US = 5_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic cfg_done,
  output logic nack_seen,
  output logic scl_oe,
  output logic sda_oe,
  input  logic sda_in
);
  localparam int NREG = 13;
  localparam int unsigned WAIT_CYC = (CLK_HZ / 1_000_000) * RESET_WAIT_US;

  function automatic logic [23:0] table_entry(input logic [3:0] i);
    case (i)
      4'd0:  return 24'h3103_11;   // system clock from pad
      4'd1:  return 24'h3008_82;   // software reset
      4'd2:  return 24'h3008_42;   // power down while configuring
      4'd3:  return 24'h3103_03;   // system clock from PLL
      4'd4:  return 24'h3017_FF;   // DVP data/sync output enable
      4'd5:  return 24'h3018_FF;   // DVP data output enable
      4'd6:  return 24'h3808_02;   // output width 640 (high)
      4'd7:  return 24'h3809_80;   // output width 640 (low)
      4'd8:  return 24'h380A_01;   // output height 480 (high)
      4'd9:  return 24'h380B_E0;   // output height 480 (low)
      4'd10: return 24'h4300_61;   // format RGB565
      4'd11: return 24'h501F_01;   // ISP format RGB
      default: return 24'h3008_02; // wake up
    endcase
  endfunction

  typedef enum logic [1:0] {C_ISSUE, C_BUSY, C_WAIT, C_DONE} st_e;
  st_e st;
  logic [3:0]  idx;
  logic        req, i2c_busy, i2c_done, nack;
  logic [47:0] rdata;
  logic [23:0] ent;
  logic [$clog2(WAIT_CYC + 2)-1:0] wcnt;

  assign ent = table_entry(idx);

  i2c_master #(.CLK_HZ(CLK_HZ), .I2C_HZ(I2C_HZ)) u_sccb (
    .clk, .rst_n, .req, .dev_addr(7'h3C), .reg_addr(ent[23:8]), .reg16(1'b1), .rd(1'b0),
    .wdata(ent[7:0]), .rlen(3'd1), .busy(i2c_busy), .done(i2c_done), .rdata, .nack,
    .scl_oe, .sda_oe, .sda_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_ISSUE; idx <= '0; req <= 1'b0; cfg_done <= 1'b0; nack_seen <= 1'b0; wcnt <= '0;
    end else begin
      req <= 1'b0;
      case (st)
        C_ISSUE: if (!i2c_busy) begin req <= 1'b1; st <= C_BUSY; end
        C_BUSY: if (i2c_done) begin
          nack_seen <= nack_seen | nack;
          wcnt <= '0;
          if (idx == 4'd1) st <= C_WAIT;
          else if (idx == 4'(NREG - 1)) st <= C_DONE;
          else begin idx <= idx + 4'd1; st <= C_ISSUE; end
        end
        C_WAIT: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == ($bits(wcnt))'(WAIT_CYC)) begin idx <= idx + 4'd1; st <= C_ISSUE; end
        end
        default: cfg_done <= 1'b1;
      endcase
    end
  end
endmodule
