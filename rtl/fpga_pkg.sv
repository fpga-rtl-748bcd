// fpga_pkg: shared sizes and types of the circle-detection pipeline.
//
// The camera delivers a 320x240 image. Image processing works on a 160x120
// copy padded to 256x128 (the next powers of two), so the internal matrix
// memory has 32768 words. Each word is a complex number packed as two 25-bit
// two's-complement halves (50 bits in all), enough for values up to
// 16777215 in magnitude. Matrix address = {y[6:0], x[7:0]} (row-major,
// 256 words per row). These sizes are the design's published ones; the
// packing order {re, im} is this implementation's choice.
package fpga_pkg;

  localparam int CAM_W    = 320;   // camera / framebuffer width
  localparam int CAM_H    = 240;   // camera / framebuffer height
  localparam int IMG_W    = 160;   // processed image width
  localparam int IMG_H    = 120;   // processed image height
  localparam int FFT_W    = 256;   // padded row length
  localparam int FFT_H    = 128;   // padded column length
  localparam int LOG_W    = 8;
  localparam int LOG_H    = 7;
  localparam int MAT_AW   = LOG_W + LOG_H;      // 15-bit matrix address
  localparam int MAT_WORDS = FFT_W * FFT_H;     // 32768
  localparam int COMP_W   = 25;                 // bits per real/imag half
  localparam int WORD_W   = 2 * COMP_W;         // 50-bit matrix word
  localparam int CAM_AW   = 17;                 // 320*240 = 76800 < 2^17
  localparam int PIX_W    = 12;                 // RGB444 framebuffer pixel

  typedef logic signed [COMP_W-1:0] comp_t;

  typedef struct packed {
    comp_t re;
    comp_t im;
  } cplx_t;

  // One request on a single-port RAM: address, write data, write enable.
  typedef struct packed {
    logic [MAT_AW-1:0] addr;
    cplx_t             wdata;
    logic              we;
  } mat_req_t;

  // Saturate a wide signed value to one 25-bit component.
  function automatic comp_t sat_comp(input logic signed [63:0] v);
    localparam logic signed [63:0] MAXV = (64'sd1 <<< (COMP_W - 1)) - 1;
    localparam logic signed [63:0] MINV = -(64'sd1 <<< (COMP_W - 1));
    if (v > MAXV) return comp_t'(MAXV);
    if (v < MINV) return comp_t'(MINV);
    return comp_t'(v);
  endfunction

endpackage
