// tb_color_threshold: all 4096 RGB444 colours against the rule
// red > 9, green < 6, blue < 6 (the module's default thresholds).
module tb_color_threshold;
  int checks = 0, failures = 0;
  logic [11:0] rgb;
  logic        mask;
  color_threshold dut (.rgb, .mask);
  initial begin
    int passed = 0;
    for (int c = 0; c < 4096; c++) begin
      bit want;
      rgb = 12'(c);
      #1;
      want = (c / 256 > 9) && ((c / 16) % 16 < 6) && (c % 16 < 6);
      checks++;
      if (mask !== want) begin failures++; $display("FAIL %h", rgb); end
      passed += int'(mask);
    end
    checks++;
    if (passed != 6 * 6 * 6) begin failures++; $display("FAIL count %0d", passed); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
