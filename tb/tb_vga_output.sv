// tb_vga_output: 640x480 timing and framebuffer scan-out.
// The framebuffer holds a pattern of its address. Checks the line period
// (800 pixels of 4 clocks), hsync width (96 pixels), the frame period (525
// lines), vsync width (2 lines), and the colour of sampled pixels in both
// display modes: 1:1 (black outside the top-left 320x240) and enlarged 2x.
module tb_vga_output;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enlarge, hsync, vsync, frame_start;
  logic [16:0] fb_raddr;
  logic [11:0] fb_rdata;
  logic [3:0] r, g, b;
  vga_output dut (.clk, .rst, .enlarge, .fb_raddr, .fb_rdata, .hsync, .vsync, .r, .g, .b, .frame_start);
  bram_sdp #(.WIDTH(12)) fb (.clk, .waddr(17'(fill_addr)), .wdata(12'(fill_addr * 5)), .we(filling), .raddr(fb_raddr), .rdata(fb_rdata));

  int  fill_addr = 0;
  logic filling = 1;
  always @(posedge clk) if (filling) begin
    if (fill_addr == 76799) filling <= 0; else fill_addr <= fill_addr + 1;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [11:0] expect_px(input int x, input int y, input bit big);
    if (big) return 12'(((y / 2) * 320 + x / 2) * 5);
    if (x < 320 && y < 240) return 12'((y * 320 + x) * 5);
    return 12'h000;
  endfunction

  initial begin
    int t0, t1, n;
    enlarge = 0;
    while (filling) @(posedge clk);
    #1 rst = 0;
    for (int mode = 0; mode < 2; mode++) begin
      enlarge = mode[0];
      while (!frame_start) begin @(posedge clk); #1; end
      // frame_start marks pixel (0,0) on the outputs; pixel k follows 4k cycles later
      t0 = 0;
      for (int y = 0; y < 525; y++) begin
        for (int x = 0; x < 800; x++) begin
          if (y < 480 && x < 640 && ((x * 7 + y * 13) % 53 == 0))
            check($sformatf("px %0d,%0d", x, y), {r, g, b} == expect_px(x, y, mode[0]));
          if (x >= 640 || y >= 480) if ((x * 3 + y) % 97 == 0) check("blank black", {r, g, b} == 0);
          check("hsync", hsync == !(x >= 656 && x < 752));
          check("vsync", vsync == !(y >= 490 && y < 492));
          repeat (4) @(posedge clk); #1;
        end
      end
      check("next frame", frame_start == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
