// tb_uart_tx: four-character coordinate message at 8 clocks per bit.
// Sends two random coordinate pairs, decodes the line by sampling each bit
// in its middle, and checks start/stop bits, the bytes x[15:8], x[7:0],
// y[15:8], y[7:0], that a click during sending is ignored, and that busy
// lasts exactly 40 bit times.
module tb_uart_tx;
  localparam int CPB = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic click, tx, busy;
  logic [15:0] x_in, y_in;
  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .click, .x_in, .y_in, .tx, .busy);

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic get_byte(output logic [7:0] b);
    while (tx) begin @(posedge clk); #1; end     // start edge
    repeat (CPB / 2) @(posedge clk); #1;
    check("start bit", tx == 0);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge clk); #1;
      b[i] = tx;
    end
    repeat (CPB) @(posedge clk); #1;
    check("stop bit", tx == 1);
  endtask

  initial begin
    logic [7:0] b [4];
    logic [15:0] ex, ey;
    int busy_cycles;
    click = 0; x_in = 0; y_in = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    check("idle high", tx == 1 && !busy);
    for (int round = 0; round < 2; round++) begin
      ex = 16'($urandom); ey = 16'($urandom);
      x_in = ex; y_in = ey; click = 1;
      @(posedge clk); #1; click = 0;
      x_in = 16'hDEAD; y_in = 16'hBEEF;
      fork
        begin
          busy_cycles = 0;
          while (busy) begin @(posedge clk); #1; busy_cycles++; end
        end
        begin
          repeat (50) @(posedge clk);
          click <= 1; @(posedge clk); click <= 0;    // ignored while sending
        end
        for (int i = 0; i < 4; i++) get_byte(b[i]);
      join
      check($sformatf("busy %0d cycles", busy_cycles), busy_cycles == 40 * CPB);
      check($sformatf("bytes %h %h %h %h", b[0], b[1], b[2], b[3]),
            {b[0], b[1]} == ex && {b[2], b[3]} == ey);
      repeat (3 * CPB) @(posedge clk); #1;
      check("no second message", tx == 1 && !busy);
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
