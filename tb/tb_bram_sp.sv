// tb_bram_sp: single-port RAM at its default 32768 x 50 size.
// Writes a pattern to every address, reads it all back, and checks the
// 2-cycle read latency (data of an address appears exactly two cycles after
// the address) and read-first behaviour on a write cycle.
module tb_bram_sp;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [14:0] addr;
  logic [49:0] wdata, rdata;
  logic        we;
  bram_sp dut (.clk, .addr, .wdata, .we, .rdata);

  function automatic logic [49:0] pat(input int a);
    return {a[14:0], 35'(a * 2654435761)} ^ 50'h2_5555_aaaa_1234;
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    we = 0; addr = 0; wdata = 0;
    @(posedge clk); #1;
    for (int a = 0; a < 32768; a++) begin
      addr = 15'(a); wdata = pat(a); we = 1;
      @(posedge clk); #1;
    end
    we = 0;
    // streamed reads: one address per cycle, data two cycles later
    for (int a = 0; a < 32768 + 1; a++) begin
      if (a < 32768) addr = 15'(a);
      @(posedge clk); #1;
      // two edges after its address was applied, a word is on rdata
      if (a >= 1) check($sformatf("read %0d", a - 1), rdata == pat(a - 1));
    end
    // read-first: write a new value and see the old one come out
    addr = 15'd77; wdata = 50'h3_0000_0000_0001; we = 1;
    @(posedge clk); #1; we = 0;
    @(posedge clk); #1;
    check("read-first", rdata == pat(77));
    @(posedge clk); #1;
    check("new value", rdata == 50'h3_0000_0000_0001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
