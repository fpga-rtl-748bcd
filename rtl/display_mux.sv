// display_mux: chooses what is written into the VGA framebuffer.
//
// Two sources can write the 320x240x12 framebuffer: the live camera stream
// and the image processor's output step. sel_result (sw[2]) gives the
// framebuffer to the image processor, so the screen shows the thresholded
// correlation image; otherwise camera pixels are written as they arrive,
// either raw or, with sel_filtered (sw[1]), colour-filtered: pixels that
// pass the red threshold keep their colour and all others are black (how a
// filtered pixel is drawn is this design's choice). Combinational.
module display_mux (
  input  logic        sel_filtered,
  input  logic        sel_result,
  // camera side
  input  logic        cam_we,
  input  logic [16:0] cam_addr,
  input  logic [11:0] cam_rgb,
  input  logic        cam_mask,
  // image processor side
  input  logic        ip_we,
  input  logic [16:0] ip_addr,
  input  logic [11:0] ip_data,
  // framebuffer write port
  output logic        fb_we,
  output logic [16:0] fb_addr,
  output logic [11:0] fb_data
);
  always_comb begin
    if (sel_result) begin
      fb_we   = ip_we;
      fb_addr = ip_addr;
      fb_data = ip_data;
    end else begin
      fb_we   = cam_we;
      fb_addr = cam_addr;
      fb_data = (sel_filtered && !cam_mask) ? 12'h000 : cam_rgb;
    end
  end
endmodule
