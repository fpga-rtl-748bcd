// tb_image_processing: whole circle detector on full-size frames.
//
// Frame 1: the one-bit camera image holds a radius-10 ring (after the 2x
// decimation) centred at a random point, a radius-5 ring elsewhere and 40
// random noise pixels. The detector must pulse click_out once with the ring's
// centre, report a peak near 56 * 32768 (56 ring pixels, unscaled inverse
// transform), draw the framebuffer (76800 writes, white at the centre, black
// far away) and step through every state in order. A frame_done pulse while
// busy must be ignored. Frame 2: an empty image must give no click. The time
// spent in each state is checked against the submodules' cycle counts.
module tb_image_processing;
  import fpga_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic frame_done_in, click_out, busy, cam_we, cam_wdata, cam_rdata, fb_we;
  logic [CAM_AW-1:0] cam_raddr, cam_waddr, fb_waddr;
  logic [11:0] fb_wdata;
  logic [15:0] x_out, y_out;
  comp_t peak;
  logic [2:0] st;

  image_processing dut (.clk, .rst, .frame_done_in, .cam_raddr, .cam_rdata, .fb_waddr, .fb_wdata, .fb_we,
                        .click_out, .x_out, .y_out, .peak_val_out(peak), .busy, .state_out(st));
  bram_sdp #(.WIDTH(1), .DEPTH(CAM_W * CAM_H)) cam (.clk, .waddr(cam_waddr), .wdata(cam_wdata), .we(cam_we),
                                                   .raddr(cam_raddr), .rdata(cam_rdata));

  logic [11:0] fb [CAM_W * CAM_H];
  int fb_writes = 0, clicks = 0;
  int state_cycles [8];
  int order [$];
  logic [2:0] last_st = 0;
  always @(posedge clk) begin
    if (fb_we) begin fb[fb_waddr] = fb_wdata; fb_writes++; end
    if (click_out) clicks++;
    if (!rst) begin
      state_cycles[st]++;
      if (st != last_st) order.push_back(int'(st));
      last_st = st;
    end
  end

  bit img [CAM_W * CAM_H];

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic ring(input int cx, input int cy, input int r);
    int d2;
    for (int dy = -r - 1; dy <= r + 1; dy++)
      for (int dx = -r - 1; dx <= r + 1; dx++) begin
        d2 = 4 * (dx * dx + dy * dy);
        if (d2 >= (2*r-1)*(2*r-1) && d2 < (2*r+1)*(2*r+1))
          if (cx+dx >= 0 && cx+dx < 160 && cy+dy >= 0 && cy+dy < 120)
            img[2 * (cy+dy) * 320 + 2 * (cx+dx)] = 1;
      end
  endtask

  task automatic load_image();
    for (int a = 0; a < CAM_W * CAM_H; a++) begin
      cam_waddr = CAM_AW'(a); cam_wdata = img[a]; cam_we = 1;
      @(posedge clk); #1;
    end
    cam_we = 0;
  endtask

  task automatic run_frame();
    foreach (state_cycles[i]) state_cycles[i] = 0;
    order.delete();
    frame_done_in = 1; @(posedge clk); #1; frame_done_in = 0;
    repeat (500000) @(posedge clk); #1;
    check("busy mid-frame", busy);
    frame_done_in = 1; @(posedge clk); #1; frame_done_in = 0;   // ignored
    while (busy) begin @(posedge clk); #1; end
  endtask

  initial begin
    int cx, cy, c0, fw0;
    frame_done_in = 0; cam_we = 0; cam_waddr = 0; cam_wdata = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    // frame 1
    cx = int'($urandom_range(20, 139)); cy = int'($urandom_range(20, 99));
    foreach (img[i]) img[i] = 0;
    ring(cx, cy, 10);
    ring((cx + 80) % 160, (cy + 60) % 120, 5);
    for (int i = 0; i < 40; i++) img[2 * int'($urandom_range(0, 119)) * 320 + 2 * int'($urandom_range(0, 159))] = 1;
    load_image();
    c0 = clicks; fw0 = fb_writes;
    run_frame();
    check($sformatf("one click (%0d)", clicks - c0), clicks - c0 == 1);
    check($sformatf("centre (%0d,%0d) want (%0d,%0d)", x_out, y_out, cx, cy), int'(x_out) == cx && int'(y_out) == cy);
    check($sformatf("peak %0d", peak), int'(peak) > 50 * 32768 && int'(peak) < 62 * 32768);
    check($sformatf("framebuffer writes %0d", fb_writes - fw0), fb_writes - fw0 == 76800);
    check("centre drawn white", fb[2 * cy * 320 + 2 * cx] == 12'hFFF);
    check("far point black", fb[2 * ((cy + 30) % 120) * 320 + 2 * ((cx + 40) % 160)] == 12'h000);
    check($sformatf("state order %p", order), order.size() == 7 &&
          order[0] == 1 && order[1] == 2 && order[2] == 3 && order[3] == 4 &&
          order[4] == 5 && order[5] == 6 && order[6] == 7 && st == 0);
    check("pixel input time", state_cycles[1] == MAT_WORDS + 4);
    check("fft time",         state_cycles[2] == 196864 + 180736 + 4);
    check("multiply time",    state_cycles[3] == 4 * MAT_WORDS + 1);
    check("ifft time",        state_cycles[4] == 196864 + 180736 + 4);
    check("peak time",        state_cycles[5] == 3 * IMG_W * IMG_H + 2);
    check("send time",        state_cycles[6] == 1);
    check("pixel out time",   state_cycles[7] == CAM_W * CAM_H + 4);
    // frame 2: nothing to find
    foreach (img[i]) img[i] = 0;
    load_image();
    c0 = clicks;
    run_frame();
    check("no click on empty frame", clicks == c0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
