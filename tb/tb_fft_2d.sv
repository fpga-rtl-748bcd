// tb_fft_2d: 2D FFT followed by 2D inverse FFT of a sparse test image.
//
// Writes 12 unit pixels at random positions into a zeroed 256x128 matrix,
// runs the forward transform and compares 300 random spectrum words with
// sum over pixels of exp(-j2pi(kx*x/256 + ky*y/128)). Then runs the inverse
// transform and checks that the image comes back multiplied by 32768 (the
// unscaled inverse) at the pixels, within 8192, and below 8192 in magnitude
// at 300 other words. The tolerances allow for the rounding of every stored
// intermediate to an integer (about +-0.5 per word per pass). Checks the
// duration of each run: 196864 + 180736 cycles, plus 2 for the hand-over
// between the passes and 1 for the start cycle.
module tb_fft_2d;
  import fpga_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     start, busy, done, inverse, tb_own;
  mat_req_t dreq, tbreq, req;
  cplx_t    rdata;

  fft_2d dut (.clk, .rst, .start, .inverse, .busy, .done, .ram_req(dreq), .ram_rdata(rdata));
  assign req = tb_own ? tbreq : dreq;
  bram_sp #(.WIDTH(WORD_W), .DEPTH(MAT_WORDS)) ram (.clk, .addr(req.addr), .wdata(req.wdata), .we(req.we), .rdata(rdata));

  localparam int NP = 12;
  int px [NP], py [NP];

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic wr(input int addr, input int re);
    tbreq.addr = MAT_AW'(addr); tbreq.we = 1; tbreq.wdata.re = comp_t'(re); tbreq.wdata.im = '0;
    @(posedge clk); #1; tbreq.we = 0;
  endtask

  task automatic rd(input int addr, output int re, output int im);
    tbreq.addr = MAT_AW'(addr); tbreq.we = 0;
    @(posedge clk); #1; @(posedge clk); #1;
    re = int'(rdata.re); im = int'(rdata.im);
  endtask

  task automatic run(input bit inv, output int cycles);
    inverse = inv; tb_own = 0; start = 1;
    @(posedge clk); #1; start = 0;
    cycles = 1;
    while (!done) begin @(posedge clk); #1; cycles++; end
    tb_own = 1;
  endtask

  function automatic bit is_pixel(input int a);
    for (int p = 0; p < NP; p++) if (py[p]*256 + px[p] == a) return 1;
    return 0;
  endfunction

  initial begin
    int cyc, re, im, a, kx, ky;
    real er, ei, ang;
    start = 0; inverse = 0; tb_own = 1; tbreq = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < MAT_WORDS; i++) wr(i, 0);
    for (int p = 0; p < NP; p++) begin
      px[p] = int'($urandom_range(0, 159)); py[p] = int'($urandom_range(0, 119));
      wr(py[p]*256 + px[p], 1);
    end
    // duplicates collapse to one pixel: rebuild list without them
    for (int p = 1; p < NP; p++)
      for (int q = 0; q < p; q++)
        if (px[p] == px[q] && py[p] == py[q]) begin px[p] = -1000; py[p] = -1000; end
    run(0, cyc);
    check($sformatf("fft cycles %0d", cyc), cyc == 196864 + 180736 + 2 + 1);
    for (int t = 0; t < 300; t++) begin
      kx = int'($urandom_range(0, 255)); ky = int'($urandom_range(0, 127));
      er = 0; ei = 0;
      for (int p = 0; p < NP; p++) if (px[p] >= 0) begin
        ang = -2.0 * 3.14159265358979323846 * (real'(kx * px[p]) / 256.0 + real'(ky * py[p]) / 128.0);
        er += $cos(ang); ei += $sin(ang);
      end
      rd(ky*256 + kx, re, im);
      check($sformatf("X[%0d,%0d] got %0d,%0d want %f,%f", kx, ky, re, im, er, ei),
            absr(re - er) < 16.0 && absr(im - ei) < 16.0);
    end
    run(1, cyc);
    check($sformatf("ifft cycles %0d", cyc), cyc == 196864 + 180736 + 2 + 1);
    for (int p = 0; p < NP; p++) if (px[p] >= 0) begin
      rd(py[p]*256 + px[p], re, im);
      check($sformatf("pixel %0d,%0d back as %0d", px[p], py[p], re),
            absr(re - 32768.0) < 8192.0 && absr(im) < 8192.0);
    end
    for (int t = 0; t < 300; t++) begin
      a = int'($urandom_range(0, MAT_WORDS - 1));
      if (!is_pixel(a)) begin
        rd(a, re, im);
        check($sformatf("empty %0d back as %0d", a, re), absr(re) < 8192.0 && absr(im) < 8192.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
