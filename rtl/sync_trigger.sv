// sync_trigger: second pulse, sensor triggers and timestamp.
//
// A counter on the 100 MHz system clock produces a one-clock pulse per second
// (pps), the first one right after reset. Each pps increments a 32-bit seconds
// count, which is the timestamp attached to the measurement it starts. Each
// sensor gets its own trigger: the pps delayed by a per-sensor number of
// clocks (DHT_OFFSET, BMP_OFFSET), which lets a sensor with a known start-up
// delay be started early or late so that the samples line up.
// Interface: pps, trig_dht, trig_bmp are one-clock pulses; timestamp changes
// in the clock after pps and holds for the whole second.
// The second-pulse reference and per-sensor trigger calibration follow the
// document; the offset mechanism and the timestamp format are this design's
// choices.
module sync_trigger #(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned DHT_OFFSET = 0,
  parameter int unsigned BMP_OFFSET = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        pps,
  output logic        trig_dht,
  output logic        trig_bmp,
  output logic [31:0] timestamp
);
  localparam int CW = $clog2(CLK_HZ);
  logic [CW-1:0] div;
  logic [CW-1:0] dly_dht, dly_bmp;
  logic          arm_dht, arm_bmp;

  assign pps = (div == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; timestamp <= '0;
      dly_dht <= '0; dly_bmp <= '0; arm_dht <= 1'b0; arm_bmp <= 1'b0;
    end else begin
      div <= (div == CW'(CLK_HZ - 1)) ? '0 : div + 1'b1;
      if (pps) timestamp <= timestamp + 1'b1;
      // per-sensor delay counters
      if (pps && DHT_OFFSET != 0) begin arm_dht <= 1'b1; dly_dht <= CW'(DHT_OFFSET - 1); end
      else if (arm_dht) begin
        if (dly_dht == '0) arm_dht <= 1'b0; else dly_dht <= dly_dht - 1'b1;
      end
      if (pps && BMP_OFFSET != 0) begin arm_bmp <= 1'b1; dly_bmp <= CW'(BMP_OFFSET - 1); end
      else if (arm_bmp) begin
        if (dly_bmp == '0) arm_bmp <= 1'b0; else dly_bmp <= dly_bmp - 1'b1;
      end
    end
  end

  assign trig_dht = (DHT_OFFSET == 0) ? pps : (arm_dht && dly_dht == '0);
  assign trig_bmp = (BMP_OFFSET == 0) ? pps : (arm_bmp && dly_bmp == '0);
endmodule
