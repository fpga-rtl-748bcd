// tb_pixel_input: decimating copy of the thresholded image.
// Fills the 320x240 one-bit memory with random bits and the matrix with
// garbage, runs the copy, then checks every matrix word: (x, y) inside
// 160x120 must hold camera bit (2x, 2y) as (bit + 0j), every padding word
// must be zero. Checks the duration: 32768 + 2 cycles after the start cycle.
module tb_pixel_input;
  import fpga_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, tb_own;
  mat_req_t dreq, tbreq, req;
  cplx_t rdata;
  logic [CAM_AW-1:0] cam_raddr, cam_waddr;
  logic cam_rdata, cam_wdata, cam_we;
  bit img [CAM_W * CAM_H];

  pixel_input dut (.clk, .rst, .start, .busy, .done, .cam_raddr, .cam_rdata, .ram_req(dreq));
  assign req = tb_own ? tbreq : dreq;
  bram_sp #(.WIDTH(WORD_W), .DEPTH(MAT_WORDS)) ram (.clk, .addr(req.addr), .wdata(req.wdata), .we(req.we), .rdata(rdata));
  bram_sdp #(.WIDTH(1), .DEPTH(CAM_W * CAM_H)) cam (.clk, .waddr(cam_waddr), .wdata(cam_wdata), .we(cam_we), .raddr(cam_raddr), .rdata(cam_rdata));

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int cyc, x, y;
    bit want;
    start = 0; tb_own = 1; tbreq = '0; cam_we = 0; cam_waddr = 0; cam_wdata = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int a = 0; a < CAM_W * CAM_H; a++) begin
      img[a] = 1'($urandom_range(0, 1));
      cam_waddr = CAM_AW'(a); cam_wdata = img[a]; cam_we = 1;
      tbreq.addr = MAT_AW'(a); tbreq.we = (a < MAT_WORDS); tbreq.wdata = {comp_t'(a), comp_t'(-a)};
      @(posedge clk); #1;
    end
    cam_we = 0; tbreq.we = 0;
    tb_own = 0; start = 1;
    @(posedge clk); #1; start = 0; cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    check($sformatf("cycles %0d", cyc), cyc == MAT_WORDS + 3);
    tb_own = 1;
    for (int a = 0; a < MAT_WORDS; a++) begin
      tbreq.addr = MAT_AW'(a);
      @(posedge clk); #1; @(posedge clk); #1;
      x = a % 256; y = a / 256;
      want = (x < 160 && y < 120) ? img[2 * y * 320 + 2 * x] : 1'b0;
      check($sformatf("word %0d", a), rdata.re == comp_t'(want) && rdata.im == 0);
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
