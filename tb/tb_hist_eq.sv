// tb_hist_eq: self-checking test of hist_eq.
// Sends four random 16x8 RGB565 frames of low contrast. A software model
// converts each pixel to YCbCr, builds the Y histogram of a frame, forms
// LUT[i] = floor(255*cdf(i)/A0) and predicts every output pixel of the next
// frame, including the inverse transform and clamping. Checks that frame 0
// produces no output, that the first output pixel comes exactly one frame
// period (plus the 5-clock pipeline) after the first input pixel, that
// lut_valid rises and that lut_overrun stays low.
`timescale 1ns/1ps
module tb_hist_eq;
  localparam int W = 16, H = 8, NF = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic vs = 0, hr = 0, ck = 0;
  logic [15:0] px = 0;
  logic ovs, ohr, ock, lut_valid, lut_overrun;
  logic [15:0] opx;
  int checks = 0, failures = 0;

  hist_eq #(.IMG_W(W), .IMG_H(H)) dut (
    .clk, .rst_n, .per_frame_vsync(vs), .per_frame_href(hr), .per_frame_clken(ck),
    .per_img_rgb(px), .post_frame_vsync(ovs), .post_frame_href(ohr),
    .post_frame_clken(ock), .post_img_rgb(opx), .lut_valid, .lut_overrun);

  logic [15:0] expq [$];
  int lut [256];
  bit have_lut = 0;
  longint cyc = 0, t_in [NF], t_out_first = -1;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int clamp(input int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // arithmetic shift right by 8 of a possibly negative integer (floor)
  function automatic int asr8(input int v);
    return (v >= 0) ? v / 256 : -((-v + 255) / 256);
  endfunction

  task automatic send_frame(input int f);
    logic [15:0] img [H][W];
    int hist [256];
    int yv, cb, cr, r, g, b, yy, cdf;
    for (int i = 0; i < 256; i++) hist[i] = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        // narrow-range colours: R,G,B in the middle of their ranges
        img[y][x] = {5'(10 + $urandom % 8), 6'(24 + $urandom % 12), 5'(8 + $urandom % 10)};
        r = {img[y][x][15:11], img[y][x][15:13]};
        g = {img[y][x][10:5], img[y][x][10:9]};
        b = {img[y][x][4:0], img[y][x][4:2]};
        yv = (77 * r + 150 * g + 29 * b) / 256;
        cb = (128 * b - 85 * g - 43 * r + 32768) / 256;
        cr = (128 * r - 107 * g - 21 * b + 32768) / 256;
        hist[yv]++;
        if (have_lut) begin
          yy = lut[yv];
          r = clamp(yy + asr8(359 * (cr - 128)));
          g = clamp(yy - asr8(88 * (cb - 128) + 183 * (cr - 128)));
          b = clamp(yy + asr8(454 * (cb - 128)));
          expq.push_back({5'(r >> 3), 6'(g >> 2), 5'(b >> 3)});
        end
      end
    cdf = 0;
    for (int i = 0; i < 256; i++) begin
      cdf += hist[i];
      lut[i] = (cdf * 255) / (W * H);
    end
    have_lut = 1;
    @(negedge clk) vs = 1;
    repeat (3) @(negedge clk);
    vs = 0;
    repeat (4) @(negedge clk);
    for (int y = 0; y < H; y++) begin
      hr = 1;
      for (int x = 0; x < W; x++) begin
        ck = 1; px = img[y][x];
        if (x == 0 && y == 0) t_in[f] = cyc;
        @(negedge clk);
      end
      ck = 0; hr = 0;
      repeat (6) @(negedge clk);
    end
    repeat (3200) @(negedge clk);     // vertical blanking for the LUT sweep
  endtask

  int nout = 0;
  always @(posedge clk) if (rst_n && ock) begin
    logic [15:0] e;
    if (t_out_first < 0) t_out_first = cyc;
    nout++;
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = expq.pop_front();
      if (e !== opx) begin
        failures++;
        if (failures < 10) $display("pixel %0d: got %h expected %h", nout - 1, opx, e);
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300) @(negedge clk);   // histogram clear after reset
    rst_n = 1;
    repeat (300) @(negedge clk);
    for (int f = 0; f < NF; f++) send_frame(f);
    checks++; if (nout != (NF - 1) * W * H) begin failures++; $display("output count %0d", nout); end
    checks++;
    if (t_out_first - t_in[0] != (t_in[1] - t_in[0]) + 5) begin
      failures++; $display("first-output latency %0d, frame period %0d", t_out_first - t_in[0], t_in[1] - t_in[0]);
    end
    checks++; if (!lut_valid) failures++;
    checks++; if (lut_overrun) begin failures++; $display("overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
