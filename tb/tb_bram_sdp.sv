// tb_bram_sdp: simple dual-port RAM, default 76800 x 1 (thresholded image)
// and a 12-bit instance (framebuffer). Writes a pattern through the write
// port while reading other words through the read port, then reads every
// word back and checks the 2-cycle read latency.
module tb_bram_sdp;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [16:0] waddr, raddr;
  logic        wd1, rd1, we;
  logic [11:0] wd12, rd12;
  bram_sdp dut1 (.clk, .waddr, .wdata(wd1), .we, .raddr, .rdata(rd1));
  bram_sdp #(.WIDTH(12)) dut12 (.clk, .waddr, .wdata(wd12), .we, .raddr, .rdata(rd12));

  function automatic logic [11:0] pat(input int a);
    return 12'(a * 37 + (a >> 7));
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wd1 = 0; wd12 = 0;
    @(posedge clk); #1;
    for (int a = 0; a < 76800; a++) begin
      waddr = 17'(a); wd12 = pat(a); wd1 = ^pat(a); we = 1;
      raddr = 17'((a * 7) % 76800);
      @(posedge clk); #1;
    end
    we = 0;
    for (int a = 0; a < 76800 + 1; a++) begin
      if (a < 76800) raddr = 17'(a);
      @(posedge clk); #1;
      if (a >= 1) begin
        check($sformatf("w12 %0d", a - 1), rd12 == pat(a - 1));
        check($sformatf("w1 %0d", a - 1), rd1 == ^pat(a - 1));
      end
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
