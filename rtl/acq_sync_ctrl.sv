// acq_sync_ctrl: synchronised acquisition of the DHT11 and BMP280 results.
//
// Each sensor has its own synchronous FIFO. On the standard trigger the
// controller writes the trigger timestamp into the first free address of both
// FIFOs, then waits. As each sensor reports completion its result is written
// behind the timestamp. Only when both results are in does the controller
// read the two FIFOs in the same clocks: first both timestamps, then both
// results, and it emits one aligned sensor_rec_t with a flag saying whether
// the two timestamps agreed. A sensor that has not answered within
// TIMEOUT_CYC clocks gets a result word with its ok bit clear, so the record
// is still produced. A trigger during collection is ignored and counted in
// missed_trig.
// Interface: trig + timestamp from sync_trigger; *_done/_ok/values from the
// sensor controllers; rec_valid pulses with rec. Timing: the record follows
// the later sensor's done by 4 clocks.
// The per-sensor FIFOs, timestamp at the first address, completion state
// machine and synchronous read enable follow the document; word layouts, the
// timeout and the missed-trigger counter are this design's choices.
module acq_sync_ctrl
  import cupping_pkg::*;
#(
  parameter int unsigned TIMEOUT_CYC = 50_000_000,
  parameter int          DEPTH       = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               trig,
  input  logic [31:0]        timestamp,
  input  logic               dht_done,
  input  logic               dht_ok,
  input  logic signed [15:0] dht_temp,
  input  logic [15:0]        dht_hum,
  input  logic               bmp_done,
  input  logic               bmp_ok,
  input  logic signed [15:0] bmp_temp,
  input  logic [19:0]        bmp_press,
  output logic               rec_valid,
  output sensor_rec_t        rec,
  output logic [7:0]         missed_trig
);
  typedef enum logic [2:0] {IDLE, COLLECT, RD_TS, RD_DATA, ASM} st_e;
  st_e st;

  logic        wr_d, wr_b, rd_both;
  logic [47:0] wd_d, wd_b, rq_d, rq_b;
  logic        empty_d, empty_b, full_d, full_b;
  logic [$clog2(DEPTH+1)-1:0] cnt_d, cnt_b;
  logic        got_d, got_b;
  logic [31:0] ts_d, ts_b;
  logic [$clog2(TIMEOUT_CYC + 1)-1:0] timer;

  sync_fifo #(.WIDTH(48), .DEPTH(DEPTH)) u_fifo_dht (
    .clk, .rst_n, .wr_en(wr_d), .wdata(wd_d), .rd_en(rd_both), .rdata(rq_d),
    .empty(empty_d), .full(full_d), .count(cnt_d));
  sync_fifo #(.WIDTH(48), .DEPTH(DEPTH)) u_fifo_bmp (
    .clk, .rst_n, .wr_en(wr_b), .wdata(wd_b), .rd_en(rd_both), .rdata(rq_b),
    .empty(empty_b), .full(full_b), .count(cnt_b));

  wire timeout = (timer == ($bits(timer))'(TIMEOUT_CYC));

  always_comb begin
    wr_d = 1'b0; wr_b = 1'b0; rd_both = 1'b0;
    wd_d = '0; wd_b = '0;
    case (st)
      IDLE: if (trig && !full_d && !full_b) begin
        wr_d = 1'b1; wr_b = 1'b1; wd_d = {16'd0, timestamp}; wd_b = {16'd0, timestamp};
      end
      COLLECT: begin
        if (!got_d && (dht_done || timeout)) begin
          wr_d = 1'b1; wd_d = {15'd0, dht_done & dht_ok, dht_hum, dht_temp};
        end
        if (!got_b && (bmp_done || timeout)) begin
          wr_b = 1'b1; wd_b = {11'd0, bmp_done & bmp_ok, bmp_press, bmp_temp};
        end
      end
      RD_TS, RD_DATA: rd_both = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; got_d <= 1'b0; got_b <= 1'b0; timer <= '0; ts_d <= '0; ts_b <= '0;
      rec_valid <= 1'b0; rec <= '0; missed_trig <= '0;
    end else begin
      rec_valid <= 1'b0;
      if (trig && st != IDLE && missed_trig != 8'hFF) missed_trig <= missed_trig + 1'b1;
      case (st)
        IDLE: if (wr_d) begin st <= COLLECT; got_d <= 1'b0; got_b <= 1'b0; timer <= '0; end
        COLLECT: begin
          if (!timeout) timer <= timer + 1'b1;
          if (wr_d) got_d <= 1'b1;
          if (wr_b) got_b <= 1'b1;
          if ((got_d || wr_d) && (got_b || wr_b)) st <= RD_TS;
        end
        RD_TS: st <= RD_DATA;
        RD_DATA: begin ts_d <= rq_d[31:0]; ts_b <= rq_b[31:0]; st <= ASM; end
        ASM: begin
          rec.timestamp <= ts_d;
          rec.t_dht     <= rq_d[15:0];
          rec.humidity  <= rq_d[31:16];
          rec.dht_ok    <= rq_d[32];
          rec.t_bmp     <= rq_b[15:0];
          rec.press <= rq_b[35:16];
          rec.bmp_ok    <= rq_b[36];
          rec.ts_match  <= (ts_d == ts_b);
          rec_valid     <= 1'b1;
          st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
