// median_filter_rgb: 3x3 median filter for an RGB565 pixel stream.
//
// The three colour channels are separated and filtered independently, then
// recombined, so no vector arithmetic is needed. Two line buffers hold the two
// previous rows; with the incoming pixel they give one column of three pixels,
// and a three-column shift register forms the 3x3 window (done for all three
// channels at once by storing whole RGB565 words). The median of nine is found
// with the three-level comparator network: level 1 sorts each window row into
// max/med/min, level 2 takes the minimum of the maxima, the median of the
// medians and the maximum of the minima, level 3 takes the median of those
// three. One pixel is accepted and one produced per clock.
//
// Interface: per_frame_* in, post_frame_* out, same meaning: vsync (frame
// sync, passed through), href (row active), clken (pixel valid) and a 16-bit
// RGB565 word {R[4:0],G[5:0],B[4:0]}.
// Timing: every output signal is the input delayed by 5 clocks. The window of
// output pixel (x,y) has input pixel (x,y) as its bottom-right corner, so the
// filtered image is offset by one pixel right and down; rows above the first
// and columns left of the first are replaced by copies of the first row and
// column. The comparator network follows the document's figure; the window
// alignment and edge handling are this design's choices.
module median_filter_rgb #(
  parameter int IMG_W = 640
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
  output logic [15:0] post_img_rgb
);
  localparam int XW = $clog2(IMG_W + 1);
  localparam int LAT = 5;

  // row/column position of the incoming pixel
  logic [XW-1:0] x;
  logic [1:0]    y;            // saturates at 2: only "row 0, row 1, later" matters
  logic          href_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; href_q <= 1'b0;
    end else begin
      href_q <= per_frame_href;
      if (per_frame_vsync) y <= '0;
      else if (href_q && !per_frame_href && y != 2'd2) y <= y + 2'd1;
      if (!per_frame_href) x <= '0;
      else if (per_frame_clken) x <= x + 1'b1;
    end
  end

  // line buffers: lb1 = previous row, lb2 = the row before it
  logic [15:0] lb1 [IMG_W];
  logic [15:0] lb2 [IMG_W];
  logic [15:0] rd1, rd2, p1;
  logic        v1, first_col1;
  logic [1:0]  y1;

  always_ff @(posedge clk) begin
    if (per_frame_clken) begin
      rd1 <= lb1[x];
      rd2 <= lb2[x];
      lb1[x] <= per_img_rgb;
      lb2[x] <= lb1[x];
    end
    p1 <= per_img_rgb;
    y1 <= y;
    first_col1 <= (x == '0);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= per_frame_clken;

  // column of three pixels with top-edge replication
  logic [15:0] col_t, col_m, col_b;
  always_comb begin
    col_b = p1;
    col_m = (y1 == 2'd0) ? p1 : rd1;
    col_t = (y1 == 2'd0) ? p1 : ((y1 == 2'd1) ? rd1 : rd2);
  end

  // 3x3 window, w[row][col], col 0 = newest
  logic [15:0] w [3][3];
  always_ff @(posedge clk) begin
    if (v1) begin
      if (first_col1) begin
        for (int c = 0; c < 3; c++) begin
          w[0][c] <= col_t; w[1][c] <= col_m; w[2][c] <= col_b;
        end
      end else begin
        w[0][0] <= col_t; w[1][0] <= col_m; w[2][0] <= col_b;
        for (int r = 0; r < 3; r++) begin
          w[r][1] <= w[r][0];
          w[r][2] <= w[r][1];
        end
      end
    end
  end

  // per-channel median networks
  logic [7:0] med [3];
  for (genvar ch = 0; ch < 3; ch++) begin : g_ch
    logic [7:0] px [3][3];
    always_comb begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          case (ch)
            0:       px[r][c] = {3'd0, w[r][c][15:11]};
            1:       px[r][c] = {2'd0, w[r][c][10:5]};
            default: px[r][c] = {3'd0, w[r][c][4:0]};
          endcase
    end
    // level 1: sort each row
    logic [7:0] mx [3], md [3], mn [3];
    logic [7:0] mx_q [3], md_q [3], mn_q [3];
    for (genvar r = 0; r < 3; r++) begin : g_l1
      sort3 u_row (.a(px[r][0]), .b(px[r][1]), .c(px[r][2]),
                   .max_o(mx[r]), .med_o(md[r]), .min_o(mn[r]));
    end
    always_ff @(posedge clk) begin
      mx_q <= mx; md_q <= md; mn_q <= mn;
    end
    // level 2: min of max, med of med, max of min
    logic [7:0] unused_a [2], unused_b [2], unused_c [2];
    logic [7:0] min_of_max, med_of_med, max_of_min;
    logic [7:0] min_of_max_q, med_of_med_q, max_of_min_q;
    sort3 u_max (.a(mx_q[0]), .b(mx_q[1]), .c(mx_q[2]),
                 .max_o(unused_a[0]), .med_o(unused_a[1]), .min_o(min_of_max));
    sort3 u_med (.a(md_q[0]), .b(md_q[1]), .c(md_q[2]),
                 .max_o(unused_b[0]), .med_o(med_of_med), .min_o(unused_b[1]));
    sort3 u_min (.a(mn_q[0]), .b(mn_q[1]), .c(mn_q[2]),
                 .max_o(max_of_min), .med_o(unused_c[0]), .min_o(unused_c[1]));
    always_ff @(posedge clk) begin
      min_of_max_q <= min_of_max; med_of_med_q <= med_of_med; max_of_min_q <= max_of_min;
    end
    // level 3: median of nine
    logic [7:0] unused_d [2], med9;
    sort3 u_fin (.a(min_of_max_q), .b(med_of_med_q), .c(max_of_min_q),
                 .max_o(unused_d[0]), .med_o(med9), .min_o(unused_d[1]));
    always_ff @(posedge clk) med[ch] <= med9;
  end

  // recombine
  assign post_img_rgb = {med[0][4:0], med[1][5:0], med[2][4:0]};

  // sync delay line
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
  assign post_frame_vsync = vs_d[LAT-1];
  assign post_frame_href  = hr_d[LAT-1];
  assign post_frame_clken = ck_d[LAT-1];
endmodule
