// bram_sdp: simple dual-port block RAM (one write port, one read port).
//
// Used twice in the system: as the 1-bit 320x240 thresholded-image memory,
// which the camera side writes and the image processor's pixel-input step
// reads, and as the 12-bit 320x240 VGA framebuffer. Write and read ports
// share one clock. Reads have READ_LATENCY cycles of latency (2 by default);
// a read of the address being written returns the old word. Defaults are the
// thresholded-image memory: 76800 x 1 bit. Contents are not reset.
module bram_sdp #(
  parameter int WIDTH        = 1,
  parameter int DEPTH        = 76800,
  parameter int READ_LATENCY = 2,
  localparam int AW          = $clog2(DEPTH)
) (
  input  logic             clk,
  // write port
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             we,
  // read port
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] pipe [READ_LATENCY];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    pipe[0] <= mem[raddr];
    for (int i = 1; i < READ_LATENCY; i++) pipe[i] <= pipe[i-1];
  end

  assign rdata = pipe[READ_LATENCY-1];

  initial assert (READ_LATENCY >= 1) else $error("READ_LATENCY must be at least 1");

endmodule
