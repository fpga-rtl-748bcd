// color_threshold: one-bit colour filter for camera pixels.
//
// A pixel passes (mask=1) when its red channel is above R_MIN and both its
// green and blue channels are below G_MAX and B_MAX: the approach circles
// are drawn red, so only they survive. The result is kept to one bit to keep
// the later Fourier-transform values small. Pixels are RGB444
// ({r[3:0], g[3:0], b[3:0]}). Purely combinational. The rule is the
// published one; the threshold values were tuned by hand on the bench and
// are not given, so the defaults here are this design's choice.
module color_threshold #(
  parameter logic [3:0] R_MIN = 4'd9,
  parameter logic [3:0] G_MAX = 4'd6,
  parameter logic [3:0] B_MAX = 4'd6
) (
  input  logic [11:0] rgb,
  output logic        mask
);
  logic [3:0] r, g, b;
  assign {r, g, b} = rgb;
  assign mask = (r > R_MIN) && (g < G_MAX) && (b < B_MAX);
endmodule
