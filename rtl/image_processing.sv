// image_processing: finds the centre of a ring of a given radius in the
// thresholded camera image (a circle Hough transform done with FFTs).
//
// The search for a circle of radius r is a correlation of the binary image
// with a ring of radius r: every set pixel votes for all points at distance r,
// and the centre collects the most votes. Correlation is done in the
// frequency domain: transform the image, multiply by the ring's precomputed
// spectrum, transform back, take the maximum.
//
// A sequencer steps through eight states, one submodule each:
//   IDLE         wait for frame_done_in (ignored while busy)
//   PIXEL_INPUT  copy the 1-bit image, decimated to 160x120, into the matrix
//   FFT          2D FFT of the matrix, in place
//   MULTIPLY     element-wise product with the kernel spectrum ROM
//   IFFT         unscaled 2D inverse FFT, in place
//   PEAKFIND     maximum of the 160x120 result, with its x and y
//   SEND         if the peak reaches DETECT_THRESH, pulse click_out for one
//                cycle with x_out/y_out (160x120 coordinates)
//   PIXEL_OUTPUT draw the thresholded result into the VGA framebuffer
// All submodules share one single-port 32768x50 matrix RAM; the sequencer
// routes the active submodule's address, data and write enable to it.
//
// Timing: the states last 32772 (pixel input), 377604 (FFT), 131073
// (multiply), 377604 (IFFT), 57602 (peak), 1 (send) and 76804 (pixel
// output) cycles, 1,053,461 cycles per frame with the IDLE cycle: 10.5 ms at
// 100 MHz. DETECT_THRESH is this design's choice (the published text says
// only that a click is sent when a circle is detected): 28 * 32768 means
// half of the 56 ring pixels of the radius-10 kernel lined up.
module image_processing
  import fpga_pkg::*;
#(
  parameter int    RADIUS        = 10,
  parameter comp_t DETECT_THRESH = comp_t'(28 * 32768),
  parameter comp_t OUT_THRESH    = comp_t'(16 * 32768)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              frame_done_in,
  // thresholded-image memory read port
  output logic [CAM_AW-1:0] cam_raddr,
  input  logic              cam_rdata,
  // framebuffer write port (PIXEL_OUTPUT)
  output logic [CAM_AW-1:0] fb_waddr,
  output logic [PIX_W-1:0]  fb_wdata,
  output logic              fb_we,
  // detection result (SEND)
  output logic              click_out,
  output logic [15:0]       x_out,
  output logic [15:0]       y_out,
  output comp_t             peak_val_out,
  output logic              busy,
  output logic [2:0]        state_out
);

  typedef enum logic [2:0] {
    IDLE, PIXEL_INPUT, FFT, MULTIPLY, IFFT, PEAKFIND, SEND, PIXEL_OUTPUT
  } state_t;
  state_t state;

  // submodule handshakes
  logic pi_start, pi_busy, pi_done;
  logic ff_start, ff_busy, ff_done, ff_inverse;
  logic mu_start, mu_busy, mu_done;
  logic pk_start, pk_busy, pk_done;
  logic po_start, po_busy, po_done;

  mat_req_t pi_req, ff_req, mu_req, pk_req, po_req, ram_req;
  cplx_t    ram_rdata, rom_rdata;
  logic [MAT_AW-1:0] rom_addr;
  logic [LOG_W-1:0]  pk_x;
  logic [LOG_H-1:0]  pk_y;
  comp_t             pk_val;

  // one-cycle start pulse on entry to each state
  logic entered;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      entered   <= 1'b0;
      click_out <= 1'b0;
      x_out     <= '0;
      y_out     <= '0;
    end else begin
      entered   <= 1'b0;
      click_out <= 1'b0;
      unique case (state)
        IDLE:         if (frame_done_in) begin state <= PIXEL_INPUT; entered <= 1'b1; end
        PIXEL_INPUT:  if (pi_done) begin state <= FFT;      entered <= 1'b1; end
        FFT:          if (ff_done) begin state <= MULTIPLY; entered <= 1'b1; end
        MULTIPLY:     if (mu_done) begin state <= IFFT;     entered <= 1'b1; end
        IFFT:         if (ff_done) begin state <= PEAKFIND; entered <= 1'b1; end
        PEAKFIND:     if (pk_done) begin state <= SEND;     entered <= 1'b1; end
        SEND: begin
          if (pk_val >= DETECT_THRESH) begin
            click_out <= 1'b1;
            x_out     <= 16'(pk_x);
            y_out     <= 16'(pk_y);
          end
          state   <= PIXEL_OUTPUT;
          entered <= 1'b1;
        end
        PIXEL_OUTPUT: if (po_done) state <= IDLE;
        default:      state <= IDLE;
      endcase
    end
  end

  assign pi_start   = entered && (state == PIXEL_INPUT);
  assign ff_start   = entered && (state == FFT || state == IFFT);
  assign ff_inverse = (state == IFFT);
  assign mu_start   = entered && (state == MULTIPLY);
  assign pk_start   = entered && (state == PEAKFIND);
  assign po_start   = entered && (state == PIXEL_OUTPUT);

  // matrix RAM port multiplexer
  always_comb begin
    unique case (state)
      PIXEL_INPUT:  ram_req = pi_req;
      FFT, IFFT:    ram_req = ff_req;
      MULTIPLY:     ram_req = mu_req;
      PEAKFIND:     ram_req = pk_req;
      PIXEL_OUTPUT: ram_req = po_req;
      default:      ram_req = '0;
    endcase
  end

  bram_sp #(.WIDTH(WORD_W), .DEPTH(MAT_WORDS)) u_matrix (
    .clk, .addr(ram_req.addr), .wdata(ram_req.wdata), .we(ram_req.we), .rdata(ram_rdata)
  );

  kernel_rom #(.RADIUS(RADIUS)) u_kernel (
    .clk, .addr(rom_addr), .rdata(rom_rdata)
  );

  pixel_input u_pixel_input (
    .clk, .rst, .start(pi_start), .busy(pi_busy), .done(pi_done),
    .cam_raddr, .cam_rdata, .ram_req(pi_req)
  );

  fft_2d u_fft_2d (
    .clk, .rst, .start(ff_start), .inverse(ff_inverse), .busy(ff_busy), .done(ff_done),
    .ram_req(ff_req), .ram_rdata
  );

  elementwise_mult u_mult (
    .clk, .rst, .start(mu_start), .busy(mu_busy), .done(mu_done),
    .ram_req(mu_req), .ram_rdata, .rom_addr, .rom_rdata
  );

  peak_finder u_peak (
    .clk, .rst, .start(pk_start), .busy(pk_busy), .done(pk_done),
    .ram_req(pk_req), .ram_rdata, .peak_x(pk_x), .peak_y(pk_y), .peak_val(pk_val)
  );

  pixel_output #(.THRESH(OUT_THRESH)) u_pixel_output (
    .clk, .rst, .start(po_start), .busy(po_busy), .done(po_done),
    .ram_req(po_req), .ram_rdata, .fb_waddr, .fb_wdata, .fb_we
  );

  assign busy         = (state != IDLE);
  assign state_out    = state;
  assign peak_val_out = pk_val;

  // only the submodule that owns the RAM may be running
  always_ff @(posedge clk)
    if (!rst) assert ($onehot0({pi_busy, ff_busy, mu_busy, pk_busy, po_busy}))
      else $error("image_processing: two submodules active");

endmodule
