// tb_fft_wrapper: row (AXIS_Y=0) and column (AXIS_Y=1) wrappers on a real
// 256x128 matrix RAM.
//
// Fills the RAM with random complex integers, runs the row wrapper forward,
// checks 6 rows against a direct DFT of the original rows, then runs the
// column wrapper with `inverse` set and checks 6 columns against the unscaled
// inverse DFT (conjugate-symmetric sum, no 1/N) of the row results. Also
// checks the pass time: rows take 128*(2*256+1024+2) cycles, columns
// 256*(2*128+448+2), each plus the start cycle.
module tb_fft_wrapper;
  import fpga_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     xs, xb, xd, ys, yb, yd, inv;
  mat_req_t xr, yr, req, tbreq;
  cplx_t    rdata;
  logic     tb_own;

  fft_wrapper #(.AXIS_Y(1'b0)) dut_x (.clk, .rst, .start(xs), .inverse(inv), .busy(xb), .done(xd), .ram_req(xr), .ram_rdata(rdata));
  fft_wrapper #(.AXIS_Y(1'b1)) dut_y (.clk, .rst, .start(ys), .inverse(inv), .busy(yb), .done(yd), .ram_req(yr), .ram_rdata(rdata));

  assign req = tb_own ? tbreq : (yb ? yr : xr);
  bram_sp #(.WIDTH(WORD_W), .DEPTH(MAT_WORDS)) ram (.clk, .addr(req.addr), .wdata(req.wdata), .we(req.we), .rdata(rdata));

  int a_re [MAT_WORDS], a_im [MAT_WORDS];   // original
  int b_re [MAT_WORDS], b_im [MAT_WORDS];   // after row pass (read back)

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic wr(input int addr, input int re, input int im);
    tbreq.addr = MAT_AW'(addr); tbreq.we = 1; tbreq.wdata.re = comp_t'(re); tbreq.wdata.im = comp_t'(im);
    @(posedge clk); #1;
    tbreq.we = 0;
  endtask

  task automatic rd(input int addr, output int re, output int im);
    tbreq.addr = MAT_AW'(addr); tbreq.we = 0;
    @(posedge clk); #1; @(posedge clk); #1;
    re = int'(rdata.re); im = int'(rdata.im);
  endtask

  task automatic run(input bit y, input bit inverse_mode, output int cycles);
    inv = inverse_mode;
    tb_own = 0;
    if (y) ys = 1; else xs = 1;
    @(posedge clk); #1; ys = 0; xs = 0;
    cycles = 1;
    while (!(y ? yd : xd)) begin @(posedge clk); #1; cycles++; end
    tb_own = 1;
  endtask

  initial begin
    int cyc, re, im, addr;
    real er, ei, ang;
    xs = 0; ys = 0; inv = 0; tb_own = 1; tbreq = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < MAT_WORDS; i++) begin
      a_re[i] = int'($urandom_range(0, 200)) - 100;
      a_im[i] = int'($urandom_range(0, 200)) - 100;
      wr(i, a_re[i], a_im[i]);
    end
    // forward row pass
    run(0, 0, cyc);
    check($sformatf("row pass cycles %0d", cyc), cyc == 128 * (2*256 + 1024 + 2) + 1);
    for (int i = 0; i < MAT_WORDS; i++) begin rd(i, re, im); b_re[i] = re; b_im[i] = im; end
    for (int rr = 0; rr < 6; rr++) begin
      int row = (rr * 23) % 128;
      for (int k = 0; k < 256; k++) begin
        er = 0; ei = 0;
        for (int n = 0; n < 256; n++) begin
          ang = -2.0 * 3.14159265358979323846 * ((n * k) % 256) / 256;
          er += a_re[row*256+n] * $cos(ang) - a_im[row*256+n] * $sin(ang);
          ei += a_re[row*256+n] * $sin(ang) + a_im[row*256+n] * $cos(ang);
        end
        addr = row*256 + k;
        check($sformatf("row %0d k %0d", row, k),
              absr(b_re[addr] - er) < 12.0 && absr(b_im[addr] - ei) < 12.0);
      end
    end
    // inverse column pass on the row results
    run(1, 1, cyc);
    check($sformatf("column pass cycles %0d", cyc), cyc == 256 * (2*128 + 448 + 2) + 1);
    for (int cc = 0; cc < 6; cc++) begin
      int col = (cc * 41 + 7) % 256;
      for (int k = 0; k < 128; k++) begin
        er = 0; ei = 0;
        for (int n = 0; n < 128; n++) begin
          ang = 2.0 * 3.14159265358979323846 * ((n * k) % 128) / 128;
          er += b_re[n*256+col] * $cos(ang) - b_im[n*256+col] * $sin(ang);
          ei += b_re[n*256+col] * $sin(ang) + b_im[n*256+col] * $cos(ang);
        end
        rd(k*256 + col, re, im);
        check($sformatf("col %0d k %0d got %0d want %f", col, k, re, er),
              absr(re - er) < 12.0 && absr(im - ei) < 12.0);
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
