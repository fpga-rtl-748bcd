// bram_sp: single-port block RAM, the image processor's internal matrix memory.
//
// One address port serves both reads and writes, as in the original design,
// which used a one-port BRAM; whichever submodule is active owns the port.
// Reads have a latency of READ_LATENCY cycles (2 by default: address
// register plus output register, the usual block-RAM arrangement), which is
// why the submodules that step through the memory wait two cycles per read.
// On a cycle with we=1 the word is written and the read pipeline returns the
// word's old contents (read-first). Default size 32768 x 50 bits, holding the
// 256x128 complex matrix. The contents are not reset; every user writes an
// address before reading it.
module bram_sp #(
  parameter int WIDTH        = 50,
  parameter int DEPTH        = 32768,
  parameter int READ_LATENCY = 2,
  localparam int AW          = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             we,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] pipe [READ_LATENCY];

  always_ff @(posedge clk) begin
    pipe[0] <= mem[addr];
    if (we) mem[addr] <= wdata;
    for (int i = 1; i < READ_LATENCY; i++) pipe[i] <= pipe[i-1];
  end

  assign rdata = pipe[READ_LATENCY-1];

  initial assert (READ_LATENCY >= 1) else $error("READ_LATENCY must be at least 1");

endmodule
