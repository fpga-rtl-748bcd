// peak_finder: locates the maximum of the correlation image.
//
// Scans only the 160x120 image part of the matrix (19200 of its 32768
// words), keeping the largest value seen and where it was. The value
// compared is the real part: the correlation of two real images is real,
// and the imaginary part holds only rounding noise (a choice of this design;
// the published description just says "the value"). A later word replaces
// the maximum only if strictly greater, so ties keep the first in scan
// order (row by row). The position comes out as separate x (0..159) and
// y (0..119) so it maps easily to a screen position.
//
// States, as published: IDLE (wait for start) -> READ_WAIT (two cycles,
// RAM read latency) -> COMPARE (update maximum, advance address) ->
// READ_WAIT ... 3 cycles per pixel, 57600 cycles per frame. `done` pulses
// for one cycle when the last pixel has been compared; the outputs hold
// until the next start.
module peak_finder
  import fpga_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output mat_req_t       ram_req,
  input  cplx_t          ram_rdata,
  output logic [LOG_W-1:0] peak_x,
  output logic [LOG_H-1:0] peak_y,
  output comp_t          peak_val
);

  typedef enum logic [1:0] {IDLE, READ_WAIT, COMPARE} state_t;
  state_t state;

  logic [LOG_W-1:0] x;
  logic [LOG_H-1:0] y;
  logic             wait_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      x        <= '0;
      y        <= '0;
      wait_cnt <= 1'b0;
      done     <= 1'b0;
      peak_x   <= '0;
      peak_y   <= '0;
      peak_val <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          x        <= '0;
          y        <= '0;
          wait_cnt <= 1'b0;
          peak_x   <= '0;
          peak_y   <= '0;
          peak_val <= {1'b1, {(COMP_W-1){1'b0}}};   // most negative value
          state    <= READ_WAIT;
        end
        READ_WAIT: begin
          wait_cnt <= ~wait_cnt;
          if (wait_cnt) state <= COMPARE;
        end
        COMPARE: begin
          if (ram_rdata.re > peak_val) begin
            peak_val <= ram_rdata.re;
            peak_x   <= x;
            peak_y   <= y;
          end
          wait_cnt <= 1'b0;
          state    <= READ_WAIT;
          if (x == LOG_W'(IMG_W - 1)) begin
            x <= '0;
            y <= y + 1'b1;
            if (y == LOG_H'(IMG_H - 1)) begin
              state <= IDLE;
              done  <= 1'b1;
            end
          end else begin
            x <= x + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    ram_req      = '0;
    ram_req.addr = {y, x};
  end

  assign busy = (state != IDLE);

endmodule
