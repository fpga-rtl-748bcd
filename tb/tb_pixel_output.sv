// tb_pixel_output: drawing the result into the framebuffer.
// Fills the matrix with random values on both sides of the threshold
// (16 * 32768), runs the output step, records every framebuffer write and
// checks that each of the 76800 addresses is written exactly once, with
// 12'hFFF where matrix word (x/2, y/2) is above the threshold and 0
// otherwise. Checks one pixel per cycle: done 76800 + 2 cycles after start.
module tb_pixel_output;
  import fpga_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, tb_own;
  mat_req_t dreq, tbreq, req;
  cplx_t rdata;
  logic [CAM_AW-1:0] fb_waddr;
  logic [11:0] fb_wdata;
  logic fb_we;
  int   val [MAT_WORDS];
  int   seen [CAM_W * CAM_H];
  logic [11:0] fb [CAM_W * CAM_H];

  pixel_output dut (.clk, .rst, .start, .busy, .done, .ram_req(dreq), .ram_rdata(rdata), .fb_waddr, .fb_wdata, .fb_we);
  assign req = tb_own ? tbreq : dreq;
  bram_sp #(.WIDTH(WORD_W), .DEPTH(MAT_WORDS)) ram (.clk, .addr(req.addr), .wdata(req.wdata), .we(req.we), .rdata(rdata));

  always @(posedge clk) if (fb_we) begin
    seen[fb_waddr]++;
    fb[fb_waddr] = fb_wdata;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int cyc, x, y;
    start = 0; tb_own = 1; tbreq = '0;
    foreach (seen[i]) seen[i] = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int a = 0; a < MAT_WORDS; a++) begin
      val[a] = 16 * 32768 + int'($urandom_range(0, 200)) - 100;
      if (a % 7 == 0) val[a] = 16 * 32768;       // exactly at threshold: dark
      tbreq.addr = MAT_AW'(a); tbreq.we = 1; tbreq.wdata = {comp_t'(val[a]), comp_t'(0)};
      @(posedge clk); #1;
    end
    tbreq.we = 0; tb_own = 0; start = 1;
    @(posedge clk); #1; start = 0; cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    check($sformatf("cycles %0d", cyc), cyc == CAM_W * CAM_H + 3);
    for (int a = 0; a < CAM_W * CAM_H; a++) begin
      x = a % 320; y = a / 320;
      check($sformatf("pixel %0d", a), seen[a] == 1 &&
            fb[a] == ((val[(y / 2) * 256 + x / 2] > 16 * 32768) ? 12'hFFF : 12'h000));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
