// pixel_output: draws the correlation image into the VGA framebuffer.
//
// Walks all 320x240 framebuffer addresses and writes 12'hFFF where the
// matching matrix word's real part is above THRESH and 12'h000 elsewhere.
// The matrix holds 160x120, so the low bit of each framebuffer coordinate is
// dropped to address it: each matrix point becomes a 2x2 block on screen.
// The rule is the published one; the threshold value is not given.
// Default THRESH = 16 * 32768: the inverse transform is not divided by its
// length (32768), so a value of v*32768 means v ring pixels coincided.
//
// Timing: one framebuffer pixel per cycle, the matrix read (2-cycle
// latency) pipelined: 76800 + 2 cycles from start to done.
module pixel_output
  import fpga_pkg::*;
#(
  parameter comp_t THRESH = comp_t'(16 * 32768)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output mat_req_t          ram_req,
  input  cplx_t             ram_rdata,
  output logic [CAM_AW-1:0] fb_waddr,
  output logic [PIX_W-1:0]  fb_wdata,
  output logic              fb_we
);

  logic              running;
  logic [8:0]        fx;    // 0..319
  logic [7:0]        fy;    // 0..239
  logic [CAM_AW-1:0] faddr;
  logic [CAM_AW-1:0] p_addr [2];
  logic [1:0]        p_vld;

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      fx      <= '0;
      fy      <= '0;
      faddr   <= '0;
      p_vld   <= '0;
      p_addr  <= '{default: '0};
      done    <= 1'b0;
    end else begin
      done      <= 1'b0;
      p_vld     <= {p_vld[0], running};
      p_addr[0] <= faddr;
      p_addr[1] <= p_addr[0];
      if (start && !busy) begin
        running <= 1'b1;
        fx      <= '0;
        fy      <= '0;
        faddr   <= '0;
      end else if (running) begin
        faddr <= faddr + 1'b1;
        if (fx == 9'(CAM_W - 1)) begin
          fx <= '0;
          fy <= fy + 1'b1;
          if (fy == 8'(CAM_H - 1)) running <= 1'b0;
        end else begin
          fx <= fx + 1'b1;
        end
      end
      if (p_vld[1] && !p_vld[0]) done <= 1'b1;
    end
  end

  always_comb begin
    ram_req      = '0;
    ram_req.addr = {fy[7:1], fx[8:1]};
  end

  assign fb_waddr = p_addr[1];
  assign fb_we    = p_vld[1];
  assign fb_wdata = (ram_rdata.re > THRESH) ? 12'hFFF : 12'h000;
  assign busy     = running || (p_vld != '0);

endmodule
