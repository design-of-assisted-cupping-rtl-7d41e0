// i2c_master: transaction-level I2C master, also used as an SCCB master.
//
// One request performs a whole register access:
//   write: START, dev+W, reg address (1 or 2 bytes), data byte, STOP
//   read : START, dev+W, reg address, repeated START, dev+R,
//          rlen bytes (ACK after each but the last, NACK after it), STOP
// With reg16 = 1 and writes only this is exactly the SCCB three-phase write
// used by the OV5640 (SCCB treats the ninth bit as don't-care; a missing
// acknowledge is reported in nack but does not abort).
// Each bit takes four quarter periods of I2C_HZ: SDA changes while SCL is low
// (quarter 0), SCL is high for quarters 1-2 and the input is sampled in
// quarter 2, SCL goes low in quarter 3.
// Interface: req (pulse, while !busy) with dev_addr, reg_addr, reg16, rd,
// wdata, rlen (1..6); done pulses at the end with rdata (first byte read in
// bits 47:40) and nack. The bus pins are open-drain: scl_oe/sda_oe = 1 pull
// the line low, sda_in is the line level. No clock stretching.
// Timing: 100 kHz by default; a 6-byte read takes about 0.9 ms.
// The document says the I2C bus was customised for SCCB; the transaction set,
// rate and bit timing are this design's choices.
module i2c_master #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned I2C_HZ = 100_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic [6:0]  dev_addr,
  input  logic [15:0] reg_addr,
  input  logic        reg16,
  input  logic        rd,
  input  logic [7:0]  wdata,
  input  logic [2:0]  rlen,
  output logic        busy,
  output logic        done,
  output logic [47:0] rdata,
  output logic        nack,
  output logic        scl_oe,
  output logic        sda_oe,
  input  logic        sda_in
);
  localparam int unsigned QDIV = (CLK_HZ / (4 * I2C_HZ) > 0) ? CLK_HZ / (4 * I2C_HZ) : 1;

  typedef enum logic [2:0] {B_IDLE, B_START, B_WBYTE, B_RBYTE, B_STOP} bit_e;
  typedef enum logic [2:0] {Q_DEVW, Q_REGH, Q_REGL, Q_WDATA, Q_RSTART, Q_DEVR, Q_READ, Q_STOP} seq_e;

  bit_e  bst;
  seq_e  seq;
  logic [$clog2(QDIV + 1)-1:0] qcnt;
  logic [1:0] q;
  logic [3:0] bi;              // bit index in byte, 8 = acknowledge
  logic [7:0] sh;
  logic [2:0] nread;
  logic [1:0] sda_s;
  // latched request
  logic [6:0]  dev_q;
  logic [15:0] reg_q;
  logic        reg16_q, rd_q;
  logic [7:0]  wdata_q;
  logic [2:0]  rlen_q;

  wire tick = (qcnt == '0);
  assign busy = (bst != B_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst <= B_IDLE; seq <= Q_DEVW; qcnt <= '0; q <= '0; bi <= '0; sh <= '0; nread <= '0;
      scl_oe <= 1'b0; sda_oe <= 1'b0; done <= 1'b0; rdata <= '0; nack <= 1'b0; sda_s <= 2'b11;
      dev_q <= '0; reg_q <= '0; reg16_q <= 1'b0; rd_q <= 1'b0; wdata_q <= '0; rlen_q <= 3'd1;
    end else begin
      done  <= 1'b0;
      sda_s <= {sda_s[0], sda_in};
      if (bst == B_IDLE) begin
        qcnt <= '0; q <= '0;
        if (req) begin
          dev_q <= dev_addr; reg_q <= reg_addr; reg16_q <= reg16; rd_q <= rd;
          wdata_q <= wdata; rlen_q <= (rlen == 0) ? 3'd1 : rlen;
          bst <= B_START; seq <= Q_DEVW; nack <= 1'b0; rdata <= '0; nread <= '0;
        end
      end else begin
        qcnt <= (qcnt == '0) ? ($bits(qcnt))'(QDIV - 1) : qcnt - 1'b1;
      end
      if (bst != B_IDLE && tick) begin
        q <= q + 2'd1;
        case (bst)
          B_START: begin
            case (q)
              2'd0: begin scl_oe <= 1'b1; sda_oe <= 1'b0; end
              2'd1: begin scl_oe <= 1'b0; sda_oe <= 1'b0; end
              2'd2: begin scl_oe <= 1'b0; sda_oe <= 1'b1; end
              default: begin
                scl_oe <= 1'b1; sda_oe <= 1'b1;
                bst <= B_WBYTE; bi <= '0;
                sh  <= (seq == Q_DEVR) ? {dev_q, 1'b1} : {dev_q, 1'b0};
              end
            endcase
          end
          B_WBYTE, B_RBYTE: begin
            case (q)
              2'd0: begin
                scl_oe <= 1'b1;
                if (bst == B_WBYTE) sda_oe <= (bi == 4'd8) ? 1'b0 : !sh[7];
                else                sda_oe <= (bi == 4'd8) ? (nread != rlen_q - 3'd1) : 1'b0;
              end
              2'd1: scl_oe <= 1'b0;
              2'd2: begin
                if (bi == 4'd8) begin
                  if (bst == B_WBYTE) nack <= nack | sda_s[1];
                end else if (bst == B_RBYTE) sh <= {sh[6:0], sda_s[1]};
              end
              default: begin
                scl_oe <= 1'b1;
                if (bst == B_WBYTE && bi != 4'd8) sh <= {sh[6:0], 1'b0};
                if (bi != 4'd8) bi <= bi + 4'd1;
                else begin
                  bi <= '0;
                  // byte finished: choose the next one
                  if (bst == B_RBYTE) begin
                    rdata[8*(5-nread) +: 8] <= sh;
                    nread <= nread + 3'd1;
                    if (nread == rlen_q - 3'd1) begin bst <= B_STOP; seq <= Q_STOP; end
                  end else begin
                    case (seq)
                      Q_DEVW: begin
                        seq <= reg16_q ? Q_REGH : Q_REGL;
                        sh  <= reg16_q ? reg_q[15:8] : reg_q[7:0];
                      end
                      Q_REGH: begin seq <= Q_REGL; sh <= reg_q[7:0]; end
                      Q_REGL: begin
                        if (rd_q) begin seq <= Q_DEVR; bst <= B_START; end
                        else begin seq <= Q_WDATA; sh <= wdata_q; end
                      end
                      Q_DEVR: begin seq <= Q_READ; bst <= B_RBYTE; end
                      default: begin seq <= Q_STOP; bst <= B_STOP; end
                    endcase
                  end
                end
              end
            endcase
          end
          B_STOP: begin
            case (q)
              2'd0: begin scl_oe <= 1'b1; sda_oe <= 1'b1; end
              2'd1: scl_oe <= 1'b0;
              2'd2: sda_oe <= 1'b0;
              default: begin bst <= B_IDLE; done <= 1'b1; end
            endcase
          end
          default: bst <= B_IDLE;
        endcase
      end
    end
  end
endmodule
