// fft_2d: in-place 2D FFT or inverse FFT of the 256x128 matrix memory.
//
// A three-state controller: IDLE waits for `start`; FFT_X runs the row
// wrapper over all 128 rows; FFT_Y then runs the column wrapper over all 256
// columns; back to IDLE with a one-cycle `done`. After both passes the memory
// holds the 2D transform of what it held before (the 2D DFT separates into
// row and column 1D DFTs). `inverse` selects the unscaled inverse transform
// in both wrappers. The RAM request is taken from whichever wrapper is
// running. Total time is the sum of the two wrappers' times.
module fft_2d
  import fpga_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     start,
  input  logic     inverse,
  output logic     busy,
  output logic     done,
  output mat_req_t ram_req,
  input  cplx_t    ram_rdata
);

  typedef enum logic [1:0] {IDLE, FFT_X, FFT_Y} state_t;
  state_t state;

  logic     inv;
  logic     x_start, x_busy, x_done, y_start, y_busy, y_done;
  mat_req_t x_req, y_req;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      inv   <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE:  if (start) begin state <= FFT_X; inv <= inverse; end
        FFT_X: if (x_done) state <= FFT_Y;
        FFT_Y: if (y_done) begin state <= IDLE; done <= 1'b1; end
        default: state <= IDLE;
      endcase
    end
  end

  assign x_start = (state == IDLE) && start;
  assign y_start = (state == FFT_X) && x_done;

  fft_wrapper #(.AXIS_Y(1'b0)) u_fft_x (
    .clk, .rst, .start(x_start), .inverse(x_start ? inverse : inv),
    .busy(x_busy), .done(x_done), .ram_req(x_req), .ram_rdata
  );

  fft_wrapper #(.AXIS_Y(1'b1)) u_fft_y (
    .clk, .rst, .start(y_start), .inverse(inv),
    .busy(y_busy), .done(y_done), .ram_req(y_req), .ram_rdata
  );

  assign ram_req = (state == FFT_Y) ? y_req : x_req;
  assign busy    = (state != IDLE);

  always_ff @(posedge clk)
    if (!rst) assert (!(x_busy && y_busy)) else $error("fft_2d: both passes active");

endmodule
