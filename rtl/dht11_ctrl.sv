// dht11_ctrl: DHT11 single-bus (one-wire, open-drain) master.
//
// On start the master pulls the line low for 18 ms and releases it. The
// sensor answers with 80 us low and 80 us high, then sends 40 bits, each a
// 50 us low followed by a high pulse of 26-28 us (0) or 70 us (1). The state
// machine measures each high time in microseconds and takes a bit as 1 when
// it exceeds 40 us. The 40 bits are humidity integer, humidity decimal,
// temperature integer, temperature decimal and a checksum (the 8-bit sum of
// the first four bytes). Any wait longer than 1 ms ends the read with ok = 0.
// Interface: start (pulse), bus_oe (1 = drive the line low), bus_in (line
// level, synchronised here); done pulses with data, ok, humidity and
// temp_c100 (temperature in 0.01 C, integer*100 + decimal*10).
// Timing: a read takes about 22-25 ms. The line timings come from the sensor
// data sheet; the document only names the single-bus state machine.
module dht11_ctrl #(
  parameter int unsigned CLK_HZ = 100_000_000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               bus_oe,
  input  logic               bus_in,
  output logic               busy,
  output logic               done,
  output logic               ok,
  output logic [39:0]        data,
  output logic [15:0]        humidity,
  output logic signed [15:0] temp_c100
);
  localparam int unsigned US = (CLK_HZ / 1_000_000 > 0) ? CLK_HZ / 1_000_000 : 1;
  localparam int unsigned START_US = 18_000;
  localparam int unsigned TIMEOUT_US = 1_000;
  localparam int unsigned ONE_US = 40;

  typedef enum logic [2:0] {IDLE, START_LOW, WAIT_RESP_LOW, RESP_LOW, RESP_HIGH,
                            BIT_LOW, BIT_HIGH} st_e;
  st_e st;
  logic [$clog2(US + 1)-1:0] pre;
  logic [14:0] us_cnt;          // microseconds in the current state
  logic [1:0]  sync;
  logic        line;
  logic [5:0]  nbit;
  logic [39:0] sh;

  assign line = sync[1];
  assign busy = (st != IDLE);
  wire us_tick = (pre == '0);

  function automatic logic sum_ok(input logic [39:0] d);
    return (d[39:32] + d[31:24] + d[23:16] + d[15:8]) == d[7:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; pre <= '0; us_cnt <= '0; sync <= 2'b11; nbit <= '0; sh <= '0;
      bus_oe <= 1'b0; done <= 1'b0; ok <= 1'b0; data <= '0; humidity <= '0; temp_c100 <= '0;
    end else begin
      sync <= {sync[0], bus_in};
      done <= 1'b0;
      pre  <= (pre == '0) ? ($bits(pre))'(US - 1) : pre - 1'b1;
      if (us_tick && us_cnt != '1) us_cnt <= us_cnt + 1'b1;
      case (st)
        IDLE: if (start) begin
          st <= START_LOW; bus_oe <= 1'b1; us_cnt <= '0; pre <= ($bits(pre))'(US - 1);
        end
        START_LOW: if (us_cnt >= 15'(START_US)) begin
          st <= WAIT_RESP_LOW; bus_oe <= 1'b0; us_cnt <= '0;
        end
        WAIT_RESP_LOW: if (!line && us_cnt >= 15'd10) begin st <= RESP_LOW; us_cnt <= '0; end
        RESP_LOW:      if (line)  begin st <= RESP_HIGH; us_cnt <= '0; end
        RESP_HIGH:     if (!line) begin st <= BIT_LOW; us_cnt <= '0; nbit <= '0; end
        BIT_LOW:       if (line)  begin st <= BIT_HIGH; us_cnt <= '0; end
        BIT_HIGH: if (!line) begin
          sh <= {sh[38:0], (us_cnt > 15'(ONE_US))};
          us_cnt <= '0;
          if (nbit == 6'd39) begin
            st <= IDLE; done <= 1'b1;
            data <= {sh[38:0], (us_cnt > 15'(ONE_US))};
            ok   <= sum_ok({sh[38:0], (us_cnt > 15'(ONE_US))});
            humidity <= {sh[38:31], sh[30:23]};
            temp_c100 <= 16'(sh[22:15]) * 16'sd100 + 16'(sh[14:7] & 8'h7F) * 16'sd10;
          end else begin
            st <= BIT_LOW; nbit <= nbit + 1'b1;
          end
        end
        default: st <= IDLE;
      endcase
      // timeout on every wait for the sensor
      if (st != IDLE && st != START_LOW && us_cnt >= 15'(TIMEOUT_US)) begin
        st <= IDLE; done <= 1'b1; ok <= 1'b0;
      end
    end
  end
endmodule
