// tb_fpga_top: end-to-end run of the whole clicker at full size and default
// parameters (100 MHz timing: 50 ms = 5,000,000 cycles, 115200 baud).
//
// Camera frames are streamed in as RGB444 pixels, one per cycle, followed
// by a frame-done pulse. Each test frame holds a red ring (radius 10 after
// the 2x decimation, drawn as 2x2 camera blocks), white and blue shapes that
// the colour filter must reject, and a dark background.
//   Frame A (filtered display, sw[1]): processed; 50 ms after the SEND step
//     (plus two cycles of registers)
//     (sw[9:7]=1) one click goes out on UART with the ring's centre. A second
//     frame-done during processing is ignored. The result image is drawn
//     into the framebuffer (sw[2] set while processing).
//   Frame B (raw display) arrives during the 100 ms cooldown (sw[6:4]=0):
//     it is detected again but no click is sent.
//   Frame C, after the cooldown, has the ring elsewhere: a second click with
//     the new centre.
// The framebuffer is inspected directly to check the display modes, and the
// VGA output runs throughout (enlarged for part of the run). Every mechanism
// is counted and one that never happened counts as a failure.
module tb_fpga_top;
  import fpga_pkg::*;
  localparam int CPB = 868;
  localparam int T50 = 5_000_000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0]  sw;
  logic        cam_valid, cam_frame_done;
  logic [8:0]  cam_x;
  logic [7:0]  cam_y;
  logic [11:0] cam_rgb;
  logic        uart_txd, vga_hs, vga_vs;
  logic [3:0]  vga_r, vga_g, vga_b;
  logic        click_valid, ip_busy, click_waiting, click_cooling, uart_busy, vga_frame_start;
  logic [15:0] click_x, click_y;
  logic [2:0]  ip_state;
  comp_t       ip_peak;

  fpga_top dut (.*);

  // ---- mechanism counters ----
  int n_detect = 0, n_detect_ignored = 0, n_clicks = 0, n_frames_done_ignored = 0;
  int n_vga_frames = 0, n_vga_frames_big = 0, n_fb_result_writes = 0;
  int n_thr_pass = 0, n_thr_fail = 0;
  logic [2:0] prev_state = 0;
  longint cyc = 0, t_detect = 0, t_click = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (ip_state == 3'd6 && prev_state != 3'd6 && int'(ip_peak) >= 28 * 32768) begin
        n_detect++;
        t_detect = cyc;
        if (click_waiting || click_cooling) n_detect_ignored++;
      end
      prev_state = ip_state;
      if (click_valid) begin n_clicks++; t_click = cyc; end
      if (cam_frame_done && ip_busy) n_frames_done_ignored++;
      if (vga_frame_start) begin n_vga_frames++; if (sw[0]) n_vga_frames_big++; end
      if (ip_state == 3'd7 && sw[2] && dut.fb_we) n_fb_result_writes++;
      if (cam_valid) begin if (dut.cam_mask) n_thr_pass++; else n_thr_fail++; end
    end
  end

  // ---- UART receiver ----
  logic [7:0] rx_q [$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = uart_txd; end
      repeat (CPB) @(posedge clk);
      if (uart_txd) rx_q.push_back(b);
      else begin failures++; $display("FAIL uart stop bit"); end
    end
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit on_ring(input int x, input int y, input int cx, input int cy);
    int d2 = 4 * ((x - cx) * (x - cx) + (y - cy) * (y - cy));
    return d2 >= 19 * 19 && d2 < 21 * 21;
  endfunction

  // camera picture: ring centre (cx, cy) in 160x120 coordinates
  function automatic logic [11:0] scene(input int X, input int Y, input int cx, input int cy);
    if (on_ring(X / 2, Y / 2, cx, cy)) return 12'hF21;                  // red ring
    if (X >= 10 && X < 40 && Y >= 200 && Y < 230) return 12'hFFF;       // white block
    if (((X - 280) * (X - 280) + (Y - 30) * (Y - 30)) < 200) return 12'h22E;   // blue disc
    return 12'h212;
  endfunction

  task automatic send_frame(input int cx, input int cy);
    for (int Y = 0; Y < CAM_H; Y++)
      for (int X = 0; X < CAM_W; X++) begin
        cam_valid = 1; cam_x = 9'(X); cam_y = 8'(Y); cam_rgb = scene(X, Y, cx, cy);
        @(posedge clk); #1;
      end
    cam_valid = 0;
    cam_frame_done = 1; @(posedge clk); #1; cam_frame_done = 0;
  endtask

  task automatic expect_click(input int cx, input int cy);
    while (n_clicks == 0 || t_click < t_detect) begin @(posedge clk); #1; end
    check($sformatf("click delay %0d", t_click - t_detect), t_click - t_detect == T50 + 2);
    check($sformatf("click at (%0d,%0d) want (%0d,%0d)", click_x, click_y, cx, cy),
          int'(click_x) == cx && int'(click_y) == cy);
    while (uart_busy) begin @(posedge clk); #1; end
    repeat (CPB * 2) @(posedge clk); #1;
    check($sformatf("uart bytes %0d", rx_q.size()), rx_q.size() == 4);
    if (rx_q.size() == 4)
      check("uart message", {rx_q[0], rx_q[1]} == 16'(cx) && {rx_q[2], rx_q[3]} == 16'(cy));
    rx_q.delete();
  endtask

  initial begin
    int ax, ay, bx, by, a;
    sw = {3'd1, 3'd0, 1'b0, 3'b010};   // delay 50 ms, cooldown 100 ms, filtered view
    cam_valid = 0; cam_frame_done = 0; cam_x = 0; cam_y = 0; cam_rgb = 0;
    repeat (5) @(posedge clk); #1 rst = 0;

    // ---- frame A ----
    ax = 57; ay = 43;
    send_frame(ax, ay);
    // filtered display: ring pixels kept, white and background dropped
    a = (2 * ay) * 320 + 2 * (ax + 10);
    check("filtered view keeps red", dut.u_framebuffer.mem[a] == 12'hF21);
    check("filtered view drops white", dut.u_framebuffer.mem[210 * 320 + 20] == 12'h000);
    check("threshold memory", dut.u_thr_mem.mem[a] == 1'b1 && dut.u_thr_mem.mem[210 * 320 + 20] == 1'b0);
    sw[2] = 1;                          // show the correlation result
    sw[0] = 1;                          // enlarged VGA view
    repeat (200000) @(posedge clk); #1;
    cam_frame_done = 1; @(posedge clk); #1; cam_frame_done = 0;   // while busy: ignored
    while (ip_busy) begin @(posedge clk); #1; end
    check("result drawn at centre", dut.u_framebuffer.mem[(2 * ay) * 320 + 2 * ax] == 12'hFFF);
    check("result dark elsewhere", dut.u_framebuffer.mem[(2 * ay) * 320 + 2 * (ax + 10)] == 12'h000);
    expect_click(ax, ay);

    // ---- frame B, inside the cooldown ----
    sw[2] = 0; sw[1] = 0; sw[0] = 0;    // raw camera view
    send_frame(ax, ay);
    check("raw view", dut.u_framebuffer.mem[210 * 320 + 20] == 12'hFFF &&
                      dut.u_framebuffer.mem[(2 * ay) * 320 + 2 * (ax + 10)] == 12'hF21);
    while (ip_busy) begin @(posedge clk); #1; end
    check("cooling while frame B detected", click_cooling);
    while (click_cooling) begin @(posedge clk); #1; end
    check("no click in cooldown", n_clicks == 1 && rx_q.size() == 0);

    // ---- frame C ----
    bx = 121; by = 88;
    send_frame(bx, by);
    while (ip_busy) begin @(posedge clk); #1; end
    begin
      int n0 = n_clicks;
      while (n_clicks == n0) begin @(posedge clk); #1; end
    end
    expect_click(bx, by);

    // ---- every mechanism must have happened ----
    check($sformatf("detections %0d", n_detect), n_detect == 3);
    check($sformatf("detections ignored in cooldown %0d", n_detect_ignored), n_detect_ignored == 1);
    check($sformatf("clicks %0d", n_clicks), n_clicks == 2);
    check($sformatf("frame-done ignored while busy %0d", n_frames_done_ignored), n_frames_done_ignored >= 1);
    check($sformatf("result pixels drawn %0d", n_fb_result_writes), n_fb_result_writes == 76800);
    check($sformatf("threshold pass %0d fail %0d", n_thr_pass, n_thr_fail), n_thr_pass > 0 && n_thr_fail > 0);
    check($sformatf("vga frames %0d enlarged %0d", n_vga_frames, n_vga_frames_big),
          n_vga_frames_big > 0 && n_vga_frames > n_vga_frames_big);
    $display("mechanisms: detect=%0d ignored_in_cooldown=%0d clicks=%0d frame_done_ignored=%0d result_px=%0d thr_pass=%0d thr_fail=%0d vga_frames=%0d enlarged=%0d",
             n_detect, n_detect_ignored, n_clicks, n_frames_done_ignored, n_fb_result_writes,
             n_thr_pass, n_thr_fail, n_vga_frames, n_vga_frames_big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
