// fpga_top: camera-driven rhythm-game clicker.
//
// A camera watches the game screen. Each camera pixel is colour-filtered
// (approach rings are drawn red) and the 1-bit result stored in a 320x240
// thresholded-image memory. At the end of each camera frame the image
// processor, if idle, looks for a ring of the configured radius in that
// image (FFT-based circle Hough transform) and reports its centre. The click
// controller waits the delay chosen on sw[9:7], sends the centre to the
// microcontroller over UART (which turns it into a touch-screen tap), and
// then ignores detections for the cooldown chosen on sw[6:4].
// The same camera pixels also go to a 320x240 framebuffer shown on VGA:
// raw, or filtered (sw[1]), or replaced by the correlation image the
// processor draws after each frame (sw[2]); sw[0] enlarges it 2x.
//
// Camera input is a pixel stream (RGB444 with its x/y position and a
// frame-done pulse) from an external capture block; the VGA outputs and the
// UART line go off-chip. Everything runs on one clock (100 MHz in the
// original). Ports beyond the board's (click_*, ip_*, uart_busy,
// vga_frame_start) are for observing the design. sw[3] is unused.
module fpga_top
  import fpga_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [9:0]  sw,
  // camera pixel stream
  input  logic        cam_valid,
  input  logic [8:0]  cam_x,
  input  logic [7:0]  cam_y,
  input  logic [11:0] cam_rgb,
  input  logic        cam_frame_done,
  // to the microcontroller
  output logic        uart_txd,
  // VGA
  output logic        vga_hs,
  output logic        vga_vs,
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  // observation
  output logic        click_valid,
  output logic [15:0] click_x,
  output logic [15:0] click_y,
  output logic        ip_busy,
  output logic [2:0]  ip_state,
  output comp_t       ip_peak,
  output logic        click_waiting,
  output logic        click_cooling,
  output logic        uart_busy,
  output logic        vga_frame_start
);

  logic              cam_mask;
  logic [CAM_AW-1:0] cam_addr;

  logic [CAM_AW-1:0] thr_raddr;
  logic              thr_rdata;

  logic [CAM_AW-1:0] ip_fb_addr;
  logic [PIX_W-1:0]  ip_fb_data;
  logic              ip_fb_we;
  logic              ip_click;
  logic [15:0]       ip_x, ip_y;

  logic              fb_we;
  logic [CAM_AW-1:0] fb_waddr, fb_raddr;
  logic [PIX_W-1:0]  fb_wdata, fb_rdata;


  assign cam_addr = CAM_AW'(int'(cam_y) * CAM_W + int'(cam_x));

  color_threshold u_threshold (.rgb(cam_rgb), .mask(cam_mask));

  // 1-bit thresholded image, always written from the camera
  bram_sdp #(.WIDTH(1), .DEPTH(CAM_W * CAM_H)) u_thr_mem (
    .clk, .waddr(cam_addr), .wdata(cam_mask), .we(cam_valid),
    .raddr(thr_raddr), .rdata(thr_rdata)
  );

  image_processing u_ip (
    .clk, .rst, .frame_done_in(cam_frame_done),
    .cam_raddr(thr_raddr), .cam_rdata(thr_rdata),
    .fb_waddr(ip_fb_addr), .fb_wdata(ip_fb_data), .fb_we(ip_fb_we),
    .click_out(ip_click), .x_out(ip_x), .y_out(ip_y), .peak_val_out(ip_peak),
    .busy(ip_busy), .state_out(ip_state)
  );

  click_control u_click (
    .clk, .rst, .detect_in(ip_click), .x_in(ip_x), .y_in(ip_y),
    .delay_sel(sw[9:7]), .cool_sel(sw[6:4]),
    .click_out(click_valid), .x_out(click_x), .y_out(click_y),
    .waiting(click_waiting), .cooling(click_cooling)
  );

  uart_tx u_uart (
    .clk, .rst, .click(click_valid), .x_in(click_x), .y_in(click_y),
    .tx(uart_txd), .busy(uart_busy)
  );

  display_mux u_mux (
    .sel_filtered(sw[1]), .sel_result(sw[2]),
    .cam_we(cam_valid), .cam_addr, .cam_rgb, .cam_mask,
    .ip_we(ip_fb_we), .ip_addr(ip_fb_addr), .ip_data(ip_fb_data),
    .fb_we, .fb_addr(fb_waddr), .fb_data(fb_wdata)
  );

  bram_sdp #(.WIDTH(PIX_W), .DEPTH(CAM_W * CAM_H)) u_framebuffer (
    .clk, .waddr(fb_waddr), .wdata(fb_wdata), .we(fb_we),
    .raddr(fb_raddr), .rdata(fb_rdata)
  );

  vga_output u_vga (
    .clk, .rst, .enlarge(sw[0]), .fb_raddr, .fb_rdata,
    .hsync(vga_hs), .vsync(vga_vs), .r(vga_r), .g(vga_g), .b(vga_b),
    .frame_start(vga_frame_start)
  );

endmodule
