// kernel_rom: the precomputed 2D Fourier transform of the circle kernel.
//
// The detector correlates the image with a one-pixel-wide ring of radius
// RADIUS. Multiplying spectra instead of convolving needs the ring's
// spectrum, which never changes, so it is held in a 32768-word ROM laid out
// like the matrix memory: word {ky, kx} holds K[kx, ky] as {re, im}.
//
// Kernel: pixel (dx, dy) is on the ring when
//   (2*RADIUS-1)^2 <= 4*(dx^2 + dy^2) < (2*RADIUS+1)^2
// (distance from the centre rounds to RADIUS). The ring is centred on the
// origin and wraps around the 256x128 edges, so the correlation peak lands
// on the circle's centre itself, not shifted by the kernel's size.
// Spectrum: K[kx,ky] = sum over ring pixels of exp(-j*2*pi*(kx*dx/256 +
// ky*dy/128)), rounded to the nearest integer. Because 128 = 256/2 the phase
// is an integer multiple of 2*pi/256, (kx*dx + 2*ky*dy) mod 256, so a
// 256-entry cosine table serves every term. The table is computed when the
// simulation or the FPGA image is initialised, not read from a file.
//
// Interface: addr in, rdata out READ_LATENCY (2) cycles later, to match the
// matrix RAM so both can be read in step.
module kernel_rom
  import fpga_pkg::*;
#(
  parameter int RADIUS       = 10,
  parameter int READ_LATENCY = 2
) (
  input  logic              clk,
  input  logic [MAT_AW-1:0] addr,
  output cplx_t             rdata
);

  localparam int SPAN = RADIUS + 1;

  cplx_t rom [MAT_WORDS];
  cplx_t pipe [READ_LATENCY];

  initial begin : fill
    real cos_t [FFT_W];
    real sin_t [FFT_W];
    real acc_re, acc_im;
    int  ring_dx [(2*SPAN+1)*(2*SPAN+1)];
    int  ring_dy [(2*SPAN+1)*(2*SPAN+1)];
    int  n_pts, d2, ph;
    for (int i = 0; i < FFT_W; i++) begin
      cos_t[i] = $cos(2.0 * 3.14159265358979323846 * i / FFT_W);
      sin_t[i] = $sin(2.0 * 3.14159265358979323846 * i / FFT_W);
    end
    n_pts = 0;
    for (int dy = -SPAN; dy <= SPAN; dy++)
      for (int dx = -SPAN; dx <= SPAN; dx++) begin
        d2 = 4 * (dx*dx + dy*dy);
        if (d2 >= (2*RADIUS-1)*(2*RADIUS-1) && d2 < (2*RADIUS+1)*(2*RADIUS+1)) begin
          ring_dx[n_pts] = dx;
          ring_dy[n_pts] = dy;
          n_pts++;
        end
      end
    for (int ky = 0; ky < FFT_H; ky++)
      for (int kx = 0; kx < FFT_W; kx++) begin
        acc_re = 0.0;
        acc_im = 0.0;
        for (int p = 0; p < n_pts; p++) begin
          ph = (kx * ring_dx[p] + 2 * ky * ring_dy[p]) & (FFT_W - 1);
          acc_re += cos_t[ph];
          acc_im -= sin_t[ph];
        end
        rom[ky*FFT_W + kx].re = comp_t'($rtoi($floor(acc_re + 0.5)));
        rom[ky*FFT_W + kx].im = comp_t'($rtoi($floor(acc_im + 0.5)));
      end
  end

  always_ff @(posedge clk) begin
    pipe[0] <= rom[addr];
    for (int i = 1; i < READ_LATENCY; i++) pipe[i] <= pipe[i-1];
  end

  assign rdata = pipe[READ_LATENCY-1];

endmodule
