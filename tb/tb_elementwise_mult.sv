// tb_elementwise_mult: complex product over the whole 256x128 matrix.
// The matrix RAM holds random complex values; a behavioural kernel memory
// (2-cycle latency, like the ROM) supplies a known function of the address.
// Checks every result word (ac-bd, ad+bc), a saturated case, and the
// published 4 cycles per word: 131072 cycles from start to done.
module tb_elementwise_mult;
  import fpga_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, tb_own;
  mat_req_t dreq, tbreq, req;
  cplx_t rdata, rom_rdata, rom_p0;
  logic [MAT_AW-1:0] rom_addr;

  elementwise_mult dut (.clk, .rst, .start, .busy, .done, .ram_req(dreq), .ram_rdata(rdata), .rom_addr, .rom_rdata);
  assign req = tb_own ? tbreq : dreq;
  bram_sp #(.WIDTH(WORD_W), .DEPTH(MAT_WORDS)) ram (.clk, .addr(req.addr), .wdata(req.wdata), .we(req.we), .rdata(rdata));

  function automatic cplx_t kern(input int a);
    cplx_t k;
    k.re = comp_t'((a % 97) - 48);
    k.im = comp_t'((a % 31) - 15);
    return k;
  endfunction
  always_ff @(posedge clk) begin
    rom_p0    <= kern(int'(rom_addr));
    rom_rdata <= rom_p0;
  end

  int are [MAT_WORDS], aim [MAT_WORDS];

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int cyc;
    longint wr, wi;
    cplx_t k;
    start = 0; tb_own = 1; tbreq = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int a = 0; a < MAT_WORDS; a++) begin
      are[a] = int'($urandom_range(0, 40000)) - 20000;
      aim[a] = int'($urandom_range(0, 40000)) - 20000;
      if (a == 5) begin are[a] = 4000000; aim[a] = 0; end   // 4e6 * 43 saturates
      tbreq.addr = MAT_AW'(a); tbreq.we = 1; tbreq.wdata.re = comp_t'(are[a]); tbreq.wdata.im = comp_t'(aim[a]);
      @(posedge clk); #1;
    end
    tbreq.we = 0; tb_own = 0; start = 1;
    @(posedge clk); #1; start = 0; cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    check($sformatf("cycles %0d", cyc), cyc == 4 * MAT_WORDS);
    tb_own = 1;
    for (int a = 0; a < MAT_WORDS; a++) begin
      tbreq.addr = MAT_AW'(a);
      @(posedge clk); #1; @(posedge clk); #1;
      k = kern(a);
      wr = longint'(are[a]) * k.re - longint'(aim[a]) * k.im;
      wi = longint'(are[a]) * k.im + longint'(aim[a]) * k.re;
      if (wr > 16777215) wr = 16777215;
      if (wr < -16777216) wr = -16777216;
      if (wi > 16777215) wi = 16777215;
      if (wi < -16777216) wi = -16777216;
      check($sformatf("addr %0d got %0d,%0d want %0d,%0d", a, rdata.re, rdata.im, wr, wi),
            longint'(rdata.re) == wr && longint'(rdata.im) == wi);
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
