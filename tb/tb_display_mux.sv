// tb_display_mux: framebuffer write selection for all switch settings,
// with random requests on both sides.
module tb_display_mux;
  int checks = 0, failures = 0;
  logic sel_filtered, sel_result, cam_we, cam_mask, ip_we, fb_we;
  logic [16:0] cam_addr, ip_addr, fb_addr;
  logic [11:0] cam_rgb, ip_data, fb_data;
  display_mux dut (.*);
  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [11:0] wd;
      {sel_filtered, sel_result, cam_we, cam_mask, ip_we} = 5'($urandom);
      cam_addr = 17'($urandom); ip_addr = 17'($urandom);
      cam_rgb = 12'($urandom); ip_data = 12'($urandom);
      #1;
      checks++;
      if (sel_result) begin
        if (fb_we !== ip_we || fb_addr !== ip_addr || fb_data !== ip_data) failures++;
      end else begin
        wd = (sel_filtered && !cam_mask) ? 12'h000 : cam_rgb;
        if (fb_we !== cam_we || fb_addr !== cam_addr || fb_data !== wd) failures++;
      end
    end
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
