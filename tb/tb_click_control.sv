// tb_click_control: click delay and cooldown with 10 clocks per 50 ms step.
// For each delay setting 0..7 and a few cooldown settings: a detection must
// produce exactly one click after 50 ms * max(sel, 1) carrying the detected
// position; detections during the delay and the 100 ms * (cool_sel + 1)
// cooldown must be ignored; a detection right after the cooldown is taken.
module tb_click_control;
  localparam int T = 10;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic detect_in, click_out, waiting, cooling;
  logic [15:0] x_in, y_in, x_out, y_out;
  logic [2:0] delay_sel, cool_sel;
  int clicks = 0;

  click_control #(.TICKS_PER_50MS(T)) dut (.clk, .rst, .detect_in, .x_in, .y_in, .delay_sel, .cool_sel,
                                           .click_out, .x_out, .y_out, .waiting, .cooling);
  always @(posedge clk) if (click_out) clicks++;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int d, c, cyc, n0;
    detect_in = 0; x_in = 0; y_in = 0; delay_sel = 0; cool_sel = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int s = 0; s < 8; s++) begin
      delay_sel = 3'(s); cool_sel = 3'((s * 3) % 8);
      d = T * ((s == 0) ? 1 : s);
      c = T * 2 * (int'(cool_sel) + 1);
      x_in = 16'(100 + s); y_in = 16'(200 + s); detect_in = 1;
      n0 = clicks;
      @(posedge clk); #1; detect_in = 0;
      x_in = 16'hFFFF; y_in = 16'hFFFF;
      cyc = 1;
      while (!click_out) begin
        @(posedge clk); #1; cyc++;
        if (cyc == 3) begin detect_in = 1; @(posedge clk); #1; detect_in = 0; cyc++; end
      end
      check($sformatf("delay %0d got %0d", s, cyc), cyc == d + 1);
      check("position", x_out == 16'(100 + s) && y_out == 16'(200 + s));
      @(posedge clk); #1;
      // detections through the cooldown are ignored
      for (int i = 0; i < c - 2; i++) begin
        detect_in = (i % 3 == 0); @(posedge clk); #1;
      end
      detect_in = 0;
      repeat (d + 5) @(posedge clk); #1;
      check("one click only", clicks == n0 + 1);
      check("idle after cooldown", !waiting && !cooling);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
