// i2c_slave_model: behavioural I2C/SCCB register-file slave for testbenches.
// Not synthesizable. Responds to device address ADDR with 8-bit (REG16 = 0)
// or 16-bit (REG16 = 1) register addresses; writes store bytes at an
// auto-incrementing pointer and are logged in wlog as {address, data}; reads
// return bytes from the pointer onwards, stopping at the master's NACK. It
// samples on SCL rising edges and drives SDA after SCL falling edges.
`timescale 1ns/1ps
module i2c_slave_model #(
  parameter logic [6:0] ADDR  = 7'h76,
  parameter bit         REG16 = 1'b0
) (
  input  logic scl,
  input  logic sda,
  output logic sda_oe
);
  typedef enum {IDLE, ADR, REGH, REGL, WDATA, RDATA, NACKED} st_e;
  st_e st = IDLE, nxt = IDLE;
  logic [7:0] regs [65536];
  logic [7:0] sh;
  logic [15:0] ptr = 0;
  int bitcnt = 0;
  bit mack;
  bit clocked = 0;    // an SCL rising edge has happened since the last falling edge
  logic [23:0] wlog [$];
  int starts = 0, stops = 0;

  initial begin
    sda_oe = 1'b0;
    foreach (regs[i]) regs[i] = 8'h00;
  end

  always @(negedge sda) if (scl) begin
    st = ADR; bitcnt = 0; sda_oe = 1'b0; starts++; clocked = 0;
  end
  always @(posedge sda) if (scl) begin
    st = IDLE; sda_oe = 1'b0; stops++;
  end

  always @(posedge scl) begin
    clocked = 1;
    if (st inside {ADR, REGH, REGL, WDATA} && bitcnt < 8) sh = {sh[6:0], sda};
    if (st == RDATA && bitcnt == 8) mack = !sda;
  end

  always @(negedge scl) if (st != IDLE && st != NACKED && clocked) begin
    clocked = 0;
    bitcnt++;
    if (bitcnt == 8) begin
      case (st)
        ADR: if (sh[7:1] == ADDR) begin
               sda_oe = 1'b1;
               nxt = sh[0] ? RDATA : (REG16 ? REGH : REGL);
             end else nxt = NACKED;
        REGH:  begin ptr[15:8] = sh; sda_oe = 1'b1; nxt = REGL; end
        REGL:  begin
                 if (REG16) ptr[7:0] = sh; else ptr = {8'h00, sh};
                 sda_oe = 1'b1; nxt = WDATA;
               end
        WDATA: begin regs[ptr] = sh; wlog.push_back({ptr, sh}); ptr++; sda_oe = 1'b1; nxt = WDATA; end
        RDATA: sda_oe = 1'b0;
        default: ;
      endcase
    end else if (bitcnt == 9) begin
      bitcnt = 0;
      sda_oe = 1'b0;
      if (st == RDATA && !mack) st = NACKED;
      else begin
        st = nxt;
        if (st == RDATA) begin
          sh = regs[ptr]; ptr++;
          sda_oe = !sh[7];
          mack = 1'b1;
          nxt = RDATA;
        end
      end
    end else if (st == RDATA) sda_oe = !sh[7 - bitcnt];
  end
endmodule
