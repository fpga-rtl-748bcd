// pixel_input: copies the thresholded camera image into the matrix RAM.
//
// The camera image is 320x240; the matrix holds 160x120, so every other
// pixel of every other row is taken: matrix (x, y) <- camera (2x, 2y),
// stored as the complex value (bit + 0j). This design also writes zero to
// every matrix word outside the 160x120 image (the padding up to 256x128):
// the matrix still holds the previous frame's correlation there, and the
// transform needs that padding to be zero.
//
// Timing: one matrix word per cycle, the camera-memory read (2-cycle
// latency) pipelined, so 32768 + 2 cycles from start to done. Of these the
// 19200 image words are the published one-pixel-per-cycle copy; the rest is
// the padding clear.
module pixel_input
  import fpga_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // thresholded-image memory read port
  output logic [CAM_AW-1:0] cam_raddr,
  input  logic              cam_rdata,
  // matrix RAM
  output mat_req_t          ram_req
);

  logic              running;
  logic [MAT_AW-1:0] cnt;
  logic [LOG_W-1:0]  x;
  logic [LOG_H-1:0]  y;
  logic              in_img;

  // read pipeline: matrix address, inside-image flag, valid
  logic [MAT_AW-1:0] p_addr [2];
  logic [1:0]        p_img, p_vld;

  assign {y, x}    = cnt;
  assign in_img    = (int'(x) < IMG_W) && (int'(y) < IMG_H);
  assign cam_raddr = CAM_AW'(2 * int'(y) * CAM_W + 2 * int'(x));

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      cnt     <= '0;
      p_vld   <= '0;
      p_img   <= '0;
      p_addr  <= '{default: '0};
      done    <= 1'b0;
    end else begin
      done      <= 1'b0;
      p_vld     <= {p_vld[0], running};
      p_img     <= {p_img[0], in_img};
      p_addr[0] <= cnt;
      p_addr[1] <= p_addr[0];
      if (start && !busy) begin
        running <= 1'b1;
        cnt     <= '0;
      end else if (running) begin
        cnt <= cnt + 1'b1;
        if (cnt == MAT_AW'(MAT_WORDS - 1)) running <= 1'b0;
      end
      if (p_vld[1] && !p_vld[0]) done <= 1'b1;
    end
  end

  always_comb begin
    ram_req          = '0;
    ram_req.addr     = p_addr[1];
    ram_req.we       = p_vld[1];
    ram_req.wdata.re = {{(COMP_W-1){1'b0}}, p_img[1] & cam_rdata};
  end

  assign busy = running || (p_vld != '0);

endmodule
