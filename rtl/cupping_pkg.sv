// cupping_pkg: types and constants shared by the cupping-diagnosis acquisition FPGA.
// It holds the aligned sensor record that travels from the acquisition
// synchroniser to the fusion stage and the serial link, the UART frame
// constants, and the Ethernet CRC-32 step function. Field widths and frame
// constants are this design's choices; the CRC is the IEEE 802.3 one.
package cupping_pkg;

  // One synchronised measurement of the slow sensors.
  typedef struct packed {
    logic [31:0]        timestamp;   // seconds count of the trigger
    logic signed [15:0] t_dht;       // DHT11 temperature, 0.01 C
    logic [15:0]        humidity;    // DHT11 humidity, integer.decimal bytes
    logic signed [15:0] t_bmp;       // BMP280 compensated temperature, 0.01 C
    logic [19:0]        press;       // BMP280 compensated pressure, Pa
    logic               dht_ok;      // DHT11 checksum good
    logic               bmp_ok;      // BMP280 transfer acknowledged
    logic               ts_match;    // both FIFOs carried the same timestamp
  } sensor_rec_t;

  localparam logic [7:0] UART_HDR0 = 8'hAA;
  localparam logic [7:0] UART_HDR1 = 8'h55;

  // Host command codes carried in the serial control frame.
  typedef enum logic [7:0] {
    CMD_SETPOINT = 8'h01,
    CMD_PUMP_EN  = 8'h02,
    CMD_DELTA_T  = 8'h03
  } host_cmd_e;

  localparam logic [15:0] IMG_MAGIC = 16'h5AA5;

  // One byte of the reflected CRC-32 (polynomial 0xEDB88320).
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc ^ {24'd0, d};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    return c;
  endfunction

endpackage
