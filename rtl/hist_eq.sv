// hist_eq: colour histogram equalisation of an RGB565 pixel stream.
//
// Each pixel is expanded to 8 bits per channel and converted to YCbCr with
// the 256x integer form of the BT.601 equations:
//   Y  = (77R + 150G + 29B) >> 8
//   Cb = (128B - 85G - 43R + 32768) >> 8
//   Cr = (128R - 107G - 21B + 32768) >> 8
// Only Y is equalised, so the colour ratios are kept. A 256-entry block-RAM
// histogram counts the Y values of a frame (read-modify-write at one pixel per
// clock, with forwarding for back-to-back equal values). When the frame ends
// (its IMG_W*IMG_H-th pixel) a sweep over the 256 bins forms the running sum and writes
//   LUT[i] = floor(255 * sum_{k<=i} H(k) / A0)
// where A0 = IMG_W*IMG_H is the number of pixels in a frame, using an 8-step restoring divider
// per bin, and clears the bin for the next frame. The next frame's Y values are
// mapped through this LUT and converted back to RGB with
//   R = Y' + (359(Cr-128) >>> 8)
//   G = Y' - ((88(Cb-128) + 183(Cr-128)) >>> 8)
//   B = Y' + (454(Cb-128) >>> 8)
// clamped to 0..255 and packed back to RGB565.
//
// Interface and timing: per_frame_* in, post_frame_* out, as in
// median_filter_rgb; outputs are the inputs delayed by 5 clocks. Because the
// mapping of frame n comes from the histogram of frame n-1, post_frame_clken
// stays low during the first frame after reset: the first valid output appears
// one frame period after the first input. The sweep takes about 2600 clocks and
// must fit in the vertical blanking; lut_overrun is set (sticky) if a pixel
// arrives during it. The forward transform, the histogram in block RAM and the
// mapping formula follow the document; the frame-delayed mapping, the divider,
// the inverse transform coefficients and the RGB565 bit replication are this
// design's choices.
module hist_eq #(
  parameter int IMG_W = 640,
  parameter int IMG_H = 480
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        per_frame_vsync,
  input  logic        per_frame_href,
  input  logic        per_frame_clken,
  input  logic [15:0] per_img_rgb,
  output logic        post_frame_vsync,
  output logic        post_frame_href,
  output logic        post_frame_clken,
  output logic [15:0] post_img_rgb,
  output logic        lut_valid,
  output logic        lut_overrun
);
  localparam int LAT = 5;
  localparam int FRAME = IMG_W * IMG_H;
  localparam int CW  = $clog2(FRAME + 1);   // pixel / bin count width

  // ---- stage 1: expand RGB565 to RGB888
  logic [7:0] r1, g1, b1;
  always_ff @(posedge clk) begin
    r1 <= {per_img_rgb[15:11], per_img_rgb[15:13]};
    g1 <= {per_img_rgb[10:5],  per_img_rgb[10:9]};
    b1 <= {per_img_rgb[4:0],   per_img_rgb[4:2]};
  end

  // ---- stage 2: RGB -> YCbCr
  logic [7:0] y2, cb2, cr2;
  logic [15:0] ysum, cbsum, crsum;
  always_comb begin
    ysum  = 16'd77 * r1 + 16'd150 * g1 + 16'd29 * b1;
    cbsum = 16'd128 * b1 + 16'd32768 - 16'd85 * g1 - 16'd43 * r1;   // always 128..65408
    crsum = 16'd128 * r1 + 16'd32768 - 16'd107 * g1 - 16'd21 * b1;
  end
  always_ff @(posedge clk) begin
    y2  <= 8'(ysum >> 8);
    cb2 <= 8'(cbsum >> 8);
    cr2 <= 8'(crsum >> 8);
  end

  // sync delay line (shared by data path and control)
  logic [LAT-1:0] vs_d, hr_d, ck_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs_d <= '0; hr_d <= '0; ck_d <= '0;
    end else begin
      vs_d <= {vs_d[LAT-2:0], per_frame_vsync};
      hr_d <= {hr_d[LAT-2:0], per_frame_href};
      ck_d <= {ck_d[LAT-2:0], per_frame_clken};
    end
  end
  wire v2 = ck_d[1];        // valid of stage-2 data

  // ---- histogram RAM and its read-modify-write
  logic [CW-1:0] hist [256];
  logic [CW-1:0] hist_rd;
  logic [7:0]    hist_raddr;
  logic [7:0]    y3;
  logic          v3;
  logic          wr_en;
  logic [7:0]    wr_addr, last_addr;
  logic [CW-1:0] wr_data, last_data;
  logic          last_wr;

  typedef enum logic [2:0] {S_CLEAR, S_IDLE, S_WAIT, S_READ, S_ACC, S_DIV, S_WRITE} sweep_e;
  sweep_e        st;
  logic [7:0]    idx;

  always_comb hist_raddr = (st == S_IDLE) ? y2 : idx;

  always_ff @(posedge clk) begin
    hist_rd <= hist[hist_raddr];
    if (wr_en) hist[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y3 <= '0; v3 <= 1'b0; last_wr <= 1'b0; last_addr <= '0; last_data <= '0;
    end else begin
      y3 <= y2;
      v3 <= v2 && (st == S_IDLE);
      last_wr   <= wr_en;
      last_addr <= wr_addr;
      last_data <= wr_data;
    end
  end

  // ---- sweep: running sum, division, LUT write, bin clear
  logic [CW-1:0]    cdf, a0, pix_cnt;
  logic [CW+7:0]    num;
  logic [3:0]       bitn;
  logic [7:0]       quo;
  logic [7:0]       lut [256];
  logic             vs_rise;
  logic             hist_clean;   // histogram started the frame all-zero

  assign vs_rise = vs_d[3] && !vs_d[4];

  always_comb begin
    wr_en = 1'b0; wr_addr = y3; wr_data = '0;
    if (v3) begin
      wr_en = 1'b1;
      wr_data = ((last_wr && last_addr == y3) ? last_data : hist_rd) + 1'b1;
    end else if (st == S_CLEAR || st == S_WRITE) begin
      wr_en = 1'b1; wr_addr = idx; wr_data = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_CLEAR; idx <= '0; cdf <= '0; a0 <= '0; pix_cnt <= '0;
      num <= '0; bitn <= '0; quo <= '0; lut_valid <= 1'b0; lut_overrun <= 1'b0;
      hist_clean <= 1'b0;
    end else begin
      if (v2 && st != S_IDLE && st != S_WAIT) begin
        lut_overrun <= 1'b1;
        hist_clean  <= 1'b0;
      end
      if (st == S_IDLE && v2) pix_cnt <= pix_cnt + 1'b1;
      case (st)
        S_CLEAR: begin
          idx <= idx + 1'b1;
          if (idx == 8'hFF) begin st <= S_IDLE; hist_clean <= 1'b1; pix_cnt <= '0; end
        end
        S_IDLE: begin
          if (v2 && pix_cnt == CW'(FRAME - 1)) begin   // last pixel of the frame
            st <= S_WAIT; a0 <= CW'(FRAME); cdf <= '0; idx <= '0; pix_cnt <= '0;
            if (!hist_clean) st <= S_CLEAR;             // damaged histogram: only clear it
          end else if (vs_rise && pix_cnt != '0) begin  // frame cut short
            st <= S_CLEAR; idx <= '0; pix_cnt <= '0;
          end
        end
        S_WAIT: st <= S_READ;           // let the last pixel's bin update land
        S_READ: st <= S_ACC;            // hist_rd valid next cycle
        S_ACC: begin
          cdf  <= cdf + hist_rd;
          num  <= (CW+8)'(cdf + hist_rd) * (CW+8)'(255);
          bitn <= 4'd7; quo <= '0;
          st   <= S_DIV;
        end
        S_DIV: begin                    // restoring division, one quotient bit per clock
          if (num >= ((CW+8)'(a0) << bitn)) begin
            num <= num - ((CW+8)'(a0) << bitn);
            quo[bitn[2:0]] <= 1'b1;
          end
          if (bitn == 4'd0) st <= S_WRITE;
          else bitn <= bitn - 4'd1;
        end
        S_WRITE: begin
          idx <= idx + 1'b1;
          if (idx == 8'hFF) begin
            st <= S_IDLE; lut_valid <= 1'b1; hist_clean <= 1'b1;
          end else st <= S_READ;
        end
        default: st <= S_CLEAR;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (st == S_WRITE) lut[idx] <= quo;

  // ---- stage 3: LUT lookup (registered read), carry chroma
  logic [7:0] yl3, cb3, cr3;
  always_ff @(posedge clk) begin
    yl3 <= lut[y2];
    cb3 <= cb2;
    cr3 <= cr2;
  end

  // ---- stage 4: YCbCr -> RGB, stage 5: clamp and pack
  logic signed [11:0] rr4, gg4, bb4;
  logic signed [19:0] dcb, dcr;
  always_comb begin
    dcb = 20'(signed'({1'b0, cb3})) - 20'sd128;
    dcr = 20'(signed'({1'b0, cr3})) - 20'sd128;
  end
  always_ff @(posedge clk) begin
    rr4 <= 12'(signed'({1'b0, yl3})) + 12'((20'sd359 * dcr) >>> 8);
    gg4 <= 12'(signed'({1'b0, yl3})) - 12'((20'sd88 * dcb + 20'sd183 * dcr) >>> 8);
    bb4 <= 12'(signed'({1'b0, yl3})) + 12'((20'sd454 * dcb) >>> 8);
  end

  function automatic logic [7:0] clamp8(input logic signed [11:0] v);
    if (v < 0) return 8'd0;
    if (v > 12'sd255) return 8'd255;
    return v[7:0];
  endfunction

  logic [7:0] rc, gc, bc;
  logic [4:0] ro, bo;
  logic [5:0] go;
  always_comb begin
    rc = clamp8(rr4);
    gc = clamp8(gg4);
    bc = clamp8(bb4);
  end
  always_ff @(posedge clk) begin
    ro <= rc[7:3];
    go <= gc[7:2];
    bo <= bc[7:3];
  end

  // A row is output only when a LUT from an earlier frame exists; the choice is
  // made at the start of each row.
  logic out_en;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_en <= 1'b0;
    else if (hr_d[LAT-2] && !hr_d[LAT-1]) out_en <= lut_valid;

  assign post_img_rgb     = {ro, go, bo};
  assign post_frame_vsync = vs_d[LAT-1];
  assign post_frame_href  = hr_d[LAT-1] & out_en;
  assign post_frame_clken = ck_d[LAT-1] & out_en;

  // The LUT must be complete before the next frame's first pixel.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(v2 && st != S_IDLE && st != S_CLEAR && st != S_WAIT));
endmodule
