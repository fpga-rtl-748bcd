// tb_fft_core: checks the streaming FFT engine against a direct DFT.
//
// Runs several 16-point and then 256-point transforms of random integer data
// (and one impulse) and compares every output with sum x[n]*exp(-j2pi nk/N)
// computed here in floating point; each output may differ by the rounding of
// the fixed-point twiddle products (tolerance 2 + N/32). Also checks the
// compute latency: first output exactly log2(N)*N/2 + 1 cycles after the
// last input is taken, and N consecutive outputs with m_last on the last.
module tb_fft_core;
  localparam int N_SMALL = 16;
  localparam int N_BIG   = 256;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // two instances, small and default-sized
  logic               s_valid_s, s_ready_s, m_valid_s, m_last_s;
  logic signed [31:0] s_re_s, s_im_s, m_re_s, m_im_s;
  logic               s_valid_b, s_ready_b, m_valid_b, m_last_b;
  logic signed [31:0] s_re_b, s_im_b, m_re_b, m_im_b;

  fft_core #(.N(N_SMALL)) dut_s (.clk, .rst, .s_valid(s_valid_s), .s_ready(s_ready_s),
    .s_re(s_re_s), .s_im(s_im_s), .m_valid(m_valid_s), .m_last(m_last_s), .m_re(m_re_s), .m_im(m_im_s));
  fft_core dut_b (.clk, .rst, .s_valid(s_valid_b), .s_ready(s_ready_b),
    .s_re(s_re_b), .s_im(s_im_b), .m_valid(m_valid_b), .m_last(m_last_b), .m_re(m_re_b), .m_im(m_im_b));

  int xr [N_BIG];
  int xi [N_BIG];

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run_one(input bit big, input int n, input int kind);
    real er, ei, ang;
    int  lat, k;
    for (int i = 0; i < n; i++) begin
      if (kind == 0) begin xr[i] = (i == 3) ? 1000 : 0; xi[i] = 0; end
      else if (kind == 1) begin xr[i] = int'($urandom_range(0, 1)); xi[i] = 0; end
      else begin xr[i] = int'($urandom_range(0, 4000)) - 2000; xi[i] = int'($urandom_range(0, 4000)) - 2000; end
    end
    // load
    for (int i = 0; i < n; i++) begin
      if (big) begin s_valid_b = 1; s_re_b = xr[i]; s_im_b = xi[i]; end
      else     begin s_valid_s = 1; s_re_s = xr[i]; s_im_s = xi[i]; end
      check("ready during load", big ? s_ready_b : s_ready_s);
      @(posedge clk); #1;
    end
    s_valid_b = 0; s_valid_s = 0;
    // latency: last accept was 1 cycle ago
    lat = 1;
    while (!(big ? m_valid_b : m_valid_s)) begin @(posedge clk); #1; lat++; end
    check($sformatf("latency %0d", lat), lat == $clog2(n) * n / 2 + 1);
    for (k = 0; k < n; k++) begin
      er = 0.0; ei = 0.0;
      for (int i = 0; i < n; i++) begin
        ang = -2.0 * 3.14159265358979323846 * ((i * k) % n) / n;
        er += xr[i] * $cos(ang) - xi[i] * $sin(ang);
        ei += xr[i] * $sin(ang) + xi[i] * $cos(ang);
      end
      check("valid", big ? m_valid_b : m_valid_s);
      check("last", (big ? m_last_b : m_last_s) == (k == n - 1));
      begin
        real dr, di, tol;
        dr = (big ? m_re_b : m_re_s) - er;
        di = (big ? m_im_b : m_im_s) - ei;
        tol = 2.0 + n / 32.0;
        check($sformatf("N=%0d k=%0d got %0d,%0d want %f,%f", n, k,
              big ? m_re_b : m_re_s, big ? m_im_b : m_im_s, er, ei),
              dr <= tol && dr >= -tol && di <= tol && di >= -tol);
      end
      @(posedge clk); #1;
    end
    check("back to load", big ? s_ready_b : s_ready_s);
  endtask

  initial begin
    s_valid_s = 0; s_valid_b = 0;
    s_re_s = 0; s_im_s = 0; s_re_b = 0; s_im_b = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    run_one(0, N_SMALL, 0);
    for (int t = 0; t < 4; t++) run_one(0, N_SMALL, 2);
    run_one(1, N_BIG, 0);
    run_one(1, N_BIG, 1);
    run_one(1, N_BIG, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
