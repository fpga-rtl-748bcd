// tb_kernel_rom: the ring spectrum ROM (radius 10).
// Counts the ring pixels independently (56 for radius 10) and checks
// K[0,0] equals that count, then checks 400 random words against the 2D DFT
// of the ring evaluated here with the full-precision angle, and checks the
// 2-cycle read latency.
module tb_kernel_rom;
  import fpga_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [MAT_AW-1:0] addr;
  cplx_t             rdata;
  kernel_rom dut (.clk, .addr, .rdata);

  int rx [600], ry [600], n;

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    real er, ei, ang, d;
    int kx, ky;
    n = 0;
    for (int y = -12; y <= 12; y++)
      for (int x = -12; x <= 12; x++) begin
        d = $sqrt(real'(x*x + y*y));
        if (d >= 9.5 && d < 10.5) begin rx[n] = x; ry[n] = y; n++; end
      end
    check($sformatf("ring pixels %0d", n), n == 56);
    addr = 0;
    @(posedge clk); #1; @(posedge clk); #1;
    check($sformatf("K[0,0] = %0d", rdata.re), int'(rdata.re) == n && rdata.im == 0);
    for (int t = 0; t < 400; t++) begin
      kx = int'($urandom_range(0, 255)); ky = int'($urandom_range(0, 127));
      er = 0; ei = 0;
      for (int p = 0; p < n; p++) begin
        ang = -2.0 * 3.14159265358979323846 * (real'(kx * rx[p]) / 256.0 + real'(ky * ry[p]) / 128.0);
        er += $cos(ang); ei += $sin(ang);
      end
      addr = MAT_AW'(ky * 256 + kx);
      @(posedge clk); #1;
      addr = 0;   // latency: data must be the earlier address's
      @(posedge clk); #1;
      check($sformatf("K[%0d,%0d] got %0d,%0d want %f,%f", kx, ky, rdata.re, rdata.im, er, ei),
            absr(real'(rdata.re) - er) <= 0.5001 && absr(real'(rdata.im) - ei) <= 0.5001);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
