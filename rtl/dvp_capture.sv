// dvp_capture: OV5640 DVP byte stream to RGB565 pixel stream.
//
// The camera sends each RGB565 pixel as two bytes on cam_data, high byte
// first, while cam_href is high; cam_vsync marks vertical blanking. This block
// pairs the bytes into one 16-bit pixel and emits it with a one-cycle
// per_frame_clken, together with per_frame_vsync and per_frame_href (the input
// signals delayed to line up with the pixel). Capture is enabled only at a
// vsync after cfg_done (synchronised into the pixel clock domain) has gone
// high, so no partial frame or frame from an unconfigured sensor leaks out.
// Timing: runs on the camera pixel clock; a pixel appears 1 clock after its
// second byte. Byte order and the start-up gating are this design's choices;
// the stream signal names follow the document's simulation figure.
module dvp_capture (
  input  logic        pclk,
  input  logic        rst_n,
  input  logic        cfg_done,
  input  logic        cam_vsync,
  input  logic        cam_href,
  input  logic [7:0]  cam_data,
  output logic        per_frame_vsync,
  output logic        per_frame_href,
  output logic        per_frame_clken,
  output logic [15:0] per_img_rgb,
  output logic        frame_start       // one pulse at the first pixel of a frame
);
  logic [1:0] cfg_sync;
  logic       vs_q, enabled, byte_sel, first_px;
  logic [7:0] hi_byte;

  always_ff @(posedge pclk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_sync <= '0; vs_q <= 1'b0; enabled <= 1'b0; byte_sel <= 1'b0; hi_byte <= '0;
      per_frame_vsync <= 1'b0; per_frame_href <= 1'b0; per_frame_clken <= 1'b0;
      per_img_rgb <= '0; first_px <= 1'b0; frame_start <= 1'b0;
    end else begin
      cfg_sync <= {cfg_sync[0], cfg_done};
      vs_q     <= cam_vsync;
      if (cam_vsync && !vs_q && cfg_sync[1]) enabled <= 1'b1;
      if (cam_vsync) first_px <= 1'b1;
      per_frame_vsync <= cam_vsync & enabled;
      per_frame_href  <= cam_href & enabled;
      per_frame_clken <= 1'b0;
      frame_start     <= 1'b0;
      if (!cam_href || !enabled) byte_sel <= 1'b0;
      else begin
        byte_sel <= ~byte_sel;
        if (!byte_sel) hi_byte <= cam_data;
        else begin
          per_img_rgb     <= {hi_byte, cam_data};
          per_frame_clken <= 1'b1;
          frame_start     <= first_px;
          first_px        <= 1'b0;
        end
      end
    end
  end
endmodule
