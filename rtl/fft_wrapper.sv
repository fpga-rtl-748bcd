// fft_wrapper: in-place 1D FFT/IFFT of every row (AXIS_Y=0, "fft_wrapper_x")
// or every column (AXIS_Y=1, "fft_wrapper_y") of the 256x128 matrix memory.
//
// For each line in turn the wrapper streams the line's words out of the
// single-port matrix RAM into its own fft_core, waits for the transform, and
// writes the results back over the same words. With `inverse` set the
// inverse transform is obtained by conjugating the samples on the way in and
// the results on the way out; as in the original, the result is not divided
// by the line length, which keeps everything in integers.
//
// Interface: pulse `start` (with `inverse` held stable) while idle; `busy`
// is high until `done` pulses for one cycle after the last write. The RAM
// request (address, data, write enable) is driven every cycle and must be
// routed to the RAM while busy. The RAM has a 2-cycle read latency.
// Timing per line of L words: L read cycles, then the core's
// L/2*log2(L) butterfly cycles and L write-back cycles, plus 2 cycles of
// read latency: 2L + (L/2)log2(L) + 2 cycles per line, 196864 for all rows
// and 180736 for all columns. Results are saturated to the 25-bit component
// width (a choice of this design; the original sized the RAM so that this
// does not happen for its images).
module fft_wrapper
  import fpga_pkg::*;
#(
  parameter bit AXIS_Y = 1'b0,
  parameter int DW     = 32,     // width inside the transform engine
  localparam int LINE_LEN = AXIS_Y ? FFT_H : FFT_W,   // words per line
  localparam int LINES    = AXIS_Y ? FFT_W : FFT_H,   // number of lines
  localparam int LLEN_W   = $clog2(LINE_LEN),
  localparam int LINES_W  = $clog2(LINES)
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     start,
  input  logic     inverse,
  output logic     busy,
  output logic     done,
  output mat_req_t ram_req,
  input  cplx_t    ram_rdata
);

  typedef enum logic [1:0] {IDLE, READ, WRITE} state_t;
  state_t state;

  logic [LINES_W-1:0] line;
  logic [LLEN_W-1:0]  rd_idx, wr_idx;
  logic [1:0]         rd_pipe;      // read issued 1 and 2 cycles ago
  logic               inv;

  // core streams
  logic                 c_s_valid, c_s_ready, c_m_valid, c_m_last;
  logic signed [DW-1:0] c_s_re, c_s_im, c_m_re, c_m_im;

  function automatic logic [MAT_AW-1:0] mat_addr(input logic [LINES_W-1:0] ln,
                                                 input logic [LLEN_W-1:0]  k);
    if (AXIS_Y) return {k, ln};   // column ln, row k
    else        return {ln, k};   // row ln, column k
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      line    <= '0;
      rd_idx  <= '0;
      wr_idx  <= '0;
      rd_pipe <= '0;
      inv     <= 1'b0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      rd_pipe <= {rd_pipe[0], 1'b0};
      unique case (state)
        IDLE: if (start) begin
          state  <= READ;
          inv    <= inverse;
          line   <= '0;
          rd_idx <= '0;
          wr_idx <= '0;
        end
        READ: begin
          rd_pipe[0] <= 1'b1;
          rd_idx     <= rd_idx + 1'b1;
          if (rd_idx == LLEN_W'(LINE_LEN - 1)) state <= WRITE;
        end
        WRITE: if (c_m_valid) begin
          wr_idx <= wr_idx + 1'b1;
          if (c_m_last) begin
            line <= line + 1'b1;
            if (line == LINES_W'(LINES - 1)) begin
              state <= IDLE;
              done  <= 1'b1;
            end else begin
              state <= READ;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // samples arrive two cycles after their read; the core is always in its
  // load phase then, because lines are processed one at a time
  assign c_s_valid = rd_pipe[1];
  assign c_s_re    = DW'(ram_rdata.re);
  assign c_s_im    = inv ? -DW'(ram_rdata.im) : DW'(ram_rdata.im);

  fft_core #(.N(LINE_LEN), .DW(DW)) u_core (
    .clk     (clk),
    .rst     (rst),
    .s_valid (c_s_valid),
    .s_ready (c_s_ready),
    .s_re    (c_s_re),
    .s_im    (c_s_im),
    .m_valid (c_m_valid),
    .m_last  (c_m_last),
    .m_re    (c_m_re),
    .m_im    (c_m_im)
  );

  always_comb begin
    ram_req = '0;
    if (state == WRITE) begin
      ram_req.addr     = mat_addr(line, wr_idx);
      ram_req.we       = c_m_valid;
      ram_req.wdata.re = sat_comp(64'(c_m_re));
      ram_req.wdata.im = inv ? sat_comp(-64'(c_m_im)) : sat_comp(64'(c_m_im));
    end else begin
      ram_req.addr     = mat_addr(line, rd_idx);
    end
  end

  assign busy = (state != IDLE);

  // a sample must never reach the core outside its load phase
  always_ff @(posedge clk)
    if (!rst && c_s_valid) assert (c_s_ready) else $error("fft_wrapper: sample lost");

endmodule
