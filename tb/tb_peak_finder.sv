// tb_peak_finder: maximum search over the 160x120 image part.
// Three rounds on random data: a planted maximum inside the image must be
// found with its x and y; a larger value planted in the padding (x >= 160
// or y >= 120) must be ignored; a value equal to the maximum later in scan
// order must not replace it. Checks 3 cycles per pixel: 57600 cycles after
// the start cycle.
module tb_peak_finder;
  import fpga_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, tb_own;
  mat_req_t dreq, tbreq, req;
  cplx_t rdata;
  logic [LOG_W-1:0] px;
  logic [LOG_H-1:0] py;
  comp_t pv;

  peak_finder dut (.clk, .rst, .start, .busy, .done, .ram_req(dreq), .ram_rdata(rdata), .peak_x(px), .peak_y(py), .peak_val(pv));
  assign req = tb_own ? tbreq : dreq;
  bram_sp #(.WIDTH(WORD_W), .DEPTH(MAT_WORDS)) ram (.clk, .addr(req.addr), .wdata(req.wdata), .we(req.we), .rdata(rdata));

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic wr(input int a, input int re, input int im);
    tbreq.addr = MAT_AW'(a); tbreq.we = 1; tbreq.wdata.re = comp_t'(re); tbreq.wdata.im = comp_t'(im);
    @(posedge clk); #1; tbreq.we = 0;
  endtask

  initial begin
    int cyc, mx, my, mv;
    start = 0; tb_own = 1; tbreq = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int round = 0; round < 3; round++) begin
      for (int a = 0; a < MAT_WORDS; a++) wr(a, int'($urandom_range(0, 2000000)) - 1000000, 9000000);
      mx = int'($urandom_range(0, 159)); my = int'($urandom_range(0, 119));
      mv = 3000000 + round;
      wr(my * 256 + mx, mv, -5);
      wr(5 * 256 + 200, 9000000, 0);    // padding column
      wr(125 * 256 + 3, 9000000, 0);    // padding row
      if (round == 2) begin mx = 0; my = 0; wr(0, mv, 0); wr(119 * 256 + 159, mv, 0); end
      tb_own = 0; start = 1;
      @(posedge clk); #1; start = 0; cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      tb_own = 1;
      check($sformatf("cycles %0d", cyc), cyc == 3 * IMG_W * IMG_H + 1);
      check($sformatf("peak (%0d,%0d)=%0d want (%0d,%0d)=%0d", px, py, pv, mx, my, mv),
            int'(px) == mx && int'(py) == my && int'(pv) == mv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
