// uart_sensor_link: framing for the serial link to the host computer.
//
// Transmit: every aligned sensor record is sent as one 17-byte frame
//   0xAA 0x55 | timestamp (4) | fused temperature (2) | calibrated DHT11
//   temperature (2) | humidity (2) | pressure in Pa (3) | status (1) | sum (1)
// multi-byte fields most significant byte first, temperatures in 0.01 C,
// status = {5'b0, ts_match, bmp_ok, dht_ok}, and the last byte the 8-bit sum
// of all bytes before it. A record arriving while a frame is still being sent
// is dropped and counted in tx_dropped.
// Receive: host control frames of six bytes
//   0xAA 0x55 | command | value (2, MSB first) | sum of the first five bytes
// command 0x01 sets the pressure set point (value = upper 16 bits of the
// 20-bit raw pressure word), 0x02 the pump enable (value bit
// 0), 0x03 the DHT11 zero-bias coefficient (signed, 0.01 C). Frames with a bad
// sum or unknown command are ignored and counted in rx_errors.
// Interface: byte-level handshakes to uart_tx (tx_valid/tx_ready/tx_data) and
// from uart_rx (rx_valid/rx_data). The "header + quantised data + checksum"
// structure follows the document; field layout and commands are this design's
// choices.
module uart_sensor_link
  import cupping_pkg::*;
#(
  parameter logic [19:0]        SETPOINT_INIT = 20'd0,
  parameter logic signed [15:0] DELTA_T_INIT  = 16'sd0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rec_valid,
  input  sensor_rec_t        rec,
  input  logic signed [15:0] t_fused,
  input  logic signed [15:0] t_dht_cal,
  output logic               tx_valid,
  output logic [7:0]         tx_data,
  input  logic               tx_ready,
  input  logic               rx_valid,
  input  logic [7:0]         rx_data,
  output logic [19:0]        setpoint,
  output logic               pump_en,
  output logic signed [15:0] delta_t,
  output logic [7:0]         frames_sent,
  output logic [7:0]         cmds_ok,
  output logic [7:0]         rx_errors,
  output logic [7:0]         tx_dropped
);
  localparam int NB = 17;

  // ---------------- transmit
  logic [7:0] frame [NB];
  logic [4:0] idx;
  logic       sending;

  function automatic logic [7:0] sum_bytes(input logic [7:0] f [NB], input int n);
    logic [7:0] s;
    s = '0;
    for (int i = 0; i < n; i++) s = s + f[i];
    return s;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; sending <= 1'b0; frames_sent <= '0; tx_dropped <= '0;
      for (int i = 0; i < NB; i++) frame[i] <= '0;
    end else begin
      if (rec_valid && sending && tx_dropped != 8'hFF) tx_dropped <= tx_dropped + 1'b1;
      if (!sending) begin
        if (rec_valid) begin
          frame[0]  <= UART_HDR0;              frame[1]  <= UART_HDR1;
          frame[2]  <= rec.timestamp[31:24];   frame[3]  <= rec.timestamp[23:16];
          frame[4]  <= rec.timestamp[15:8];    frame[5]  <= rec.timestamp[7:0];
          frame[6]  <= t_fused[15:8];          frame[7]  <= t_fused[7:0];
          frame[8]  <= t_dht_cal[15:8];        frame[9]  <= t_dht_cal[7:0];
          frame[10] <= rec.humidity[15:8];     frame[11] <= rec.humidity[7:0];
          frame[12] <= {4'd0, rec.press[19:16]};
          frame[13] <= rec.press[15:8];    frame[14] <= rec.press[7:0];
          frame[15] <= {5'd0, rec.ts_match, rec.bmp_ok, rec.dht_ok};
          frame[16] <= '0;
          sending <= 1'b1; idx <= '0;
        end
      end else begin
        if (idx == 5'd0) frame[16] <= sum_bytes(frame, NB - 1);   // sent last
        if (tx_valid && tx_ready) begin
          if (idx == 5'(NB - 1)) begin
            sending <= 1'b0; frames_sent <= frames_sent + 1'b1;
          end
          idx <= idx + 1'b1;
        end
      end
    end
  end

  assign tx_valid = sending;
  assign tx_data  = frame[idx];

  // ---------------- receive
  typedef enum logic [2:0] {R_H0, R_H1, R_CMD, R_V1, R_V0, R_SUM} rst_e;
  rst_e rs;
  logic [7:0]  cmd, v1, vlo, rsum;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_H0; cmd <= '0; v1 <= '0; rsum <= '0;
      setpoint <= SETPOINT_INIT; pump_en <= 1'b0; delta_t <= DELTA_T_INIT;
      cmds_ok <= '0; rx_errors <= '0;
    end else if (rx_valid) begin
      case (rs)
        R_H0:  if (rx_data == UART_HDR0) begin rs <= R_H1; rsum <= rx_data; end
        R_H1:  if (rx_data == UART_HDR1) begin rs <= R_CMD; rsum <= rsum + rx_data; end
               else rs <= R_H0;
        R_CMD: begin cmd <= rx_data; rsum <= rsum + rx_data; rs <= R_V1; end
        R_V1:  begin v1 <= rx_data; rsum <= rsum + rx_data; rs <= R_V0; end
        R_V0:  begin vlo <= rx_data; rsum <= rsum + rx_data; rs <= R_SUM; end
        default: begin
          rs <= R_H0;
          if (rx_data != rsum) begin
            if (rx_errors != 8'hFF) rx_errors <= rx_errors + 1'b1;
          end else begin
            case (cmd)
              CMD_SETPOINT: setpoint <= {v1, vlo, 4'd0};
              CMD_PUMP_EN:  pump_en  <= vlo[0];
              CMD_DELTA_T:  delta_t  <= {v1, vlo};
              default: ;
            endcase
            if (cmd inside {CMD_SETPOINT, CMD_PUMP_EN, CMD_DELTA_T}) cmds_ok <= cmds_ok + 1'b1;
            else if (rx_errors != 8'hFF) rx_errors <= rx_errors + 1'b1;
          end
        end
      endcase
    end
  end
endmodule
