// tb_median_filter: self-checking test of median_filter_rgb.
// Streams three random 16x8 RGB565 frames (one with salt-and-pepper noise,
// one with random pixel gaps) through the filter and compares every output
// pixel with a software median of nine computed per channel by sorting, on the
// window whose bottom-right corner is the pixel, with edge replication. Also
// checks the 5-clock latency and one pixel per clock throughput.
`timescale 1ns/1ps
module tb_median_filter;
  localparam int W = 16, H = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic vs = 0, hr = 0, ck = 0;
  logic [15:0] px = 0;
  logic ovs, ohr, ock;
  logic [15:0] opx;
  int checks = 0, failures = 0;

  median_filter_rgb #(.IMG_W(W)) dut (
    .clk, .rst_n, .per_frame_vsync(vs), .per_frame_href(hr), .per_frame_clken(ck),
    .per_img_rgb(px), .post_frame_vsync(ovs), .post_frame_href(ohr),
    .post_frame_clken(ock), .post_img_rgb(opx));

  logic [15:0] img [H][W];
  logic [15:0] expq [$];
  longint cyc = 0, t_in_first = -1, t_out_first = -1;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [7:0] chan(input logic [15:0] p, input int c);
    case (c) 0: return {3'd0, p[15:11]}; 1: return {2'd0, p[10:5]}; default: return {3'd0, p[4:0]}; endcase
  endfunction

  function automatic logic [15:0] ref_med(input int x, input int y);
    logic [7:0] v [9];
    logic [7:0] m [3];
    logic [7:0] t;
    for (int c = 0; c < 3; c++) begin
      int k = 0;
      for (int dy = -2; dy <= 0; dy++)
        for (int dx = -2; dx <= 0; dx++) begin
          int yy = (y + dy < 0) ? 0 : y + dy;
          int xx = (x + dx < 0) ? 0 : x + dx;
          v[k++] = chan(img[yy][xx], c);
        end
      for (int i = 0; i < 9; i++)
        for (int j = 0; j < 8 - i; j++)
          if (v[j] > v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
      m[c] = v[4];
    end
    return {m[0][4:0], m[1][5:0], m[2][4:0]};
  endfunction

  task automatic send_frame(input int mode);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        img[y][x] = 16'($urandom);
        if (mode == 1) img[y][x] = ($urandom % 4 == 0) ? (($urandom % 2) ? 16'hFFFF : 16'h0000) : 16'h8410;
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) expq.push_back(ref_med(x, y));
    @(negedge clk) vs = 1;
    repeat (3) @(negedge clk);
    vs = 0;
    repeat (4) @(negedge clk);
    for (int y = 0; y < H; y++) begin
      hr = 1;
      for (int x = 0; x < W; x++) begin
        if (mode == 2) while ($urandom % 3 == 0) begin ck = 0; @(negedge clk); end
        ck = 1; px = img[y][x];
        if (t_in_first < 0) t_in_first = cyc;
        @(negedge clk);
      end
      ck = 0; hr = 0;
      repeat (6) @(negedge clk);
    end
    repeat (10) @(negedge clk);
  endtask

  // output checker
  int nout = 0, run = 0, maxrun = 0;
  always @(posedge clk) if (rst_n) begin
    if (ock) begin
      logic [15:0] e;
      if (t_out_first < 0) t_out_first = cyc;
      run++;
      if (run > maxrun) maxrun = run;
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
    end else run = 0;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    send_frame(0);
    send_frame(1);
    send_frame(2);
    repeat (20) @(negedge clk);
    checks++; if (nout != 3 * W * H) begin failures++; $display("output count %0d", nout); end
    checks++; if (t_out_first - t_in_first != 5) begin failures++; $display("latency %0d", t_out_first - t_in_first); end
    checks++; if (maxrun < W) begin failures++; $display("throughput: longest run %0d", maxrun); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
