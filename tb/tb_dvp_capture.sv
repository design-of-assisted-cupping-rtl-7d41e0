// tb_dvp_capture: self-checking test of dvp_capture. Drives OV5640-style DVP
// timing (vsync pulse, href rows of 2*W bytes) for frames before and after
// cfg_done. Checks that nothing is output before the first vsync after
// cfg_done, that each pixel is the high byte followed by the low byte, the
// pixel count per row and frame, and the frame_start pulse.
`timescale 1ns/1ps
module tb_dvp_capture;
  localparam int W = 10, H = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg = 0, vs = 0, hr = 0, ovs, ohr, ock, fs;
  logic [7:0] d = 0;
  logic [15:0] px;
  int checks = 0, failures = 0;
  dvp_capture dut (.pclk(clk), .rst_n, .cfg_done(cfg), .cam_vsync(vs), .cam_href(hr), .cam_data(d),
    .per_frame_vsync(ovs), .per_frame_href(ohr), .per_frame_clken(ock), .per_img_rgb(px),
    .frame_start(fs));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] expq [$];
  int npx = 0, nfs = 0;
  bit first_of_frame = 0;
  always @(posedge clk) if (rst_n && ock) begin
    logic [15:0] e;
    npx++;
    check(expq.size() > 0, "unexpected pixel");
    if (expq.size() > 0) begin e = expq.pop_front(); check(px == e, $sformatf("pixel %h expected %h", px, e)); end
    check(fs == first_of_frame, "frame_start on the first pixel only");
    first_of_frame = 0;
    check(ohr, "href with pixel");
  end
  always @(posedge clk) if (fs && rst_n) nfs++;

  task automatic frame(input bit expect_out);
    @(negedge clk) vs = 1; repeat (4) @(negedge clk); vs = 0; repeat (6) @(negedge clk);
    if (expect_out) first_of_frame = 1;
    for (int y = 0; y < H; y++) begin
      hr = 1;
      for (int x = 0; x < W; x++) begin
        logic [15:0] p;
        p = 16'($urandom);
        if (expect_out) expq.push_back(p);
        d = p[15:8]; @(negedge clk);
        d = p[7:0];  @(negedge clk);
      end
      hr = 0; repeat (5) @(negedge clk);
    end
  endtask

  initial begin
    #100_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    frame(0);
    check(npx == 0, "no output before configuration");
    cfg = 1;
    // a frame already running when cfg_done rises is skipped: start mid-row
    hr = 1; repeat (7) @(negedge clk); hr = 0; repeat (3) @(negedge clk);
    check(npx == 0, "partial frame skipped");
    frame(1);
    frame(1);
    repeat (5) @(negedge clk);
    check(npx == 2 * W * H, $sformatf("pixel count %0d", npx));
    check(nfs == 2, "two frame starts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
