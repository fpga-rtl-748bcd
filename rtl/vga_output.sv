// vga_output: 640x480 VGA scan-out of the 320x240 framebuffer.
//
// Standard 640x480 at 60 Hz timing (800 x 525 pixel periods, negative
// sync pulses) with one pixel every CLK_DIV clock cycles (4 at 100 MHz
// gives the 25 MHz pixel rate). With `enlarge` (sw[0]) each framebuffer
// pixel is drawn as a 2x2 block filling the screen; without it the image is
// drawn 1:1 in the top-left 320x240 and the rest is black. The framebuffer
// read (2-cycle latency) is started when the counters move and its word is
// registered at the next pixel step together with the sync signals, so all
// outputs are one pixel period behind the counters. The VGA block itself
// came with the original's starter code; this is a plain equivalent.
module vga_output #(
  parameter int CLK_DIV = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enlarge,
  output logic [16:0] fb_raddr,
  input  logic [11:0] fb_rdata,
  output logic        hsync,
  output logic        vsync,
  output logic [3:0]  r,
  output logic [3:0]  g,
  output logic [3:0]  b,
  output logic        frame_start
);

  localparam int H_VIS = 640, H_FP = 16, H_SYNC = 96, H_TOT = 800;
  localparam int V_VIS = 480, V_FP = 10, V_SYNC = 2,  V_TOT = 525;
  localparam int DW = $clog2(CLK_DIV);

  logic [DW-1:0] div;
  logic          pix_en;
  logic [9:0]    hc, vc;
  logic          shown;

  assign pix_en = (div == DW'(CLK_DIV - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0;
      hc  <= '0;
      vc  <= '0;
    end else begin
      div <= pix_en ? '0 : div + 1'b1;
      if (pix_en) begin
        if (hc == 10'(H_TOT - 1)) begin
          hc <= '0;
          vc <= (vc == 10'(V_TOT - 1)) ? '0 : vc + 1'b1;
        end else begin
          hc <= hc + 1'b1;
        end
      end
    end
  end

  always_comb begin
    if (enlarge) begin
      shown    = (hc < 10'(H_VIS)) && (vc < 10'(V_VIS));
      fb_raddr = 17'(int'(vc[9:1]) * 320 + int'(hc[9:1]));
    end else begin
      shown    = (hc < 10'd320) && (vc < 10'd240);
      fb_raddr = 17'(int'(vc) * 320 + int'(hc));
    end
    if (!shown) fb_raddr = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hsync       <= 1'b1;
      vsync       <= 1'b1;
      {r, g, b}   <= '0;
      frame_start <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      if (pix_en) begin
        hsync       <= !((hc >= 10'(H_VIS + H_FP)) && (hc < 10'(H_VIS + H_FP + H_SYNC)));
        vsync       <= !((vc >= 10'(V_VIS + V_FP)) && (vc < 10'(V_VIS + V_FP + V_SYNC)));
        {r, g, b}   <= shown ? fb_rdata : 12'h000;
        frame_start <= (hc == '0) && (vc == '0);
      end
    end
  end

  initial assert (CLK_DIV >= 3) else $error("CLK_DIV must cover the framebuffer read latency");

endmodule
