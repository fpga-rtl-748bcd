// uart_tx: sends a click position to the microcontroller over UART.
//
// When `click` is pulsed while idle, x_in and y_in (16 bits each) are
// latched and sent as four 8N1 characters: x[15:8], x[7:0], y[15:8],
// y[7:0] (each: start bit 0, eight data bits LSB first, stop bit 1).
// Two states, as published: IDLE (wait for click) and SENDING (shift the
// 40 bits out, then back to IDLE). A click while SENDING is ignored.
// CLKS_PER_BIT sets the baud rate: 868 gives 115200 baud from 100 MHz.
// The character order and the baud rate are this design's choice; the
// published description gives only "two 16-bit inputs as 4 UART packets".
// A whole message takes 40 * CLKS_PER_BIT cycles.
module uart_tx #(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        click,
  input  logic [15:0] x_in,
  input  logic [15:0] y_in,
  output logic        tx,
  output logic        busy
);

  typedef enum logic {IDLE, SENDING} state_t;
  state_t state;

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic [39:0]   shreg;
  logic [5:0]    bits_left;
  logic [CW-1:0] clk_cnt;

  function automatic logic [9:0] frame(input logic [7:0] b);
    return {1'b1, b, 1'b0};   // sent LSB first: start, data, stop
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      shreg     <= '1;
      bits_left <= '0;
      clk_cnt   <= '0;
    end else begin
      unique case (state)
        IDLE: if (click) begin
          shreg     <= {frame(y_in[7:0]), frame(y_in[15:8]), frame(x_in[7:0]), frame(x_in[15:8])};
          bits_left <= 6'd40;
          clk_cnt   <= '0;
          state     <= SENDING;
        end
        SENDING: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt   <= '0;
            shreg     <= {1'b1, shreg[39:1]};
            bits_left <= bits_left - 1'b1;
            if (bits_left == 6'd1) state <= IDLE;
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign tx   = (state == SENDING) ? shreg[0] : 1'b1;
  assign busy = (state == SENDING);

endmodule
