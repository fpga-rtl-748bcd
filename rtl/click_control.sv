// click_control: delays each detected click and enforces a cooldown.
//
// A detection (detect_in pulse with x_in/y_in) in IDLE is latched and the
// module waits DELAY before passing it on as a one-cycle click_out with the
// latched position; it then ignores detections for COOLDOWN before
// returning to IDLE. The delay lets the click land when the shrinking
// approach ring meets the hit circle, after it was seen while still large
// and easy to detect.
//   DELAY    = 50 ms * max(delay_sel, 1)   -> 50 ms .. 350 ms (sw[9:7])
//   COOLDOWN = 100 ms * (cool_sel + 1)     -> 100 ms .. 800 ms (sw[6:4])
// The delay range is the published one; the mapping of switch value 0 and
// the cooldown scale are this design's choice. TICKS_PER_50MS is the number
// of clock cycles in 50 ms (5,000,000 at 100 MHz).
module click_control #(
  parameter int TICKS_PER_50MS = 5_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        detect_in,
  input  logic [15:0] x_in,
  input  logic [15:0] y_in,
  input  logic [2:0]  delay_sel,
  input  logic [2:0]  cool_sel,
  output logic        click_out,
  output logic [15:0] x_out,
  output logic [15:0] y_out,
  output logic        waiting,
  output logic        cooling
);

  typedef enum logic [1:0] {IDLE, DELAY, COOLDOWN} state_t;
  state_t state;

  localparam int TW = $clog2(TICKS_PER_50MS + 1);

  logic [TW-1:0] tick;     // cycles within the current 50 ms step
  logic [3:0]    steps;    // 50 ms steps still to wait
  logic          step_end;

  assign step_end = (tick == TW'(TICKS_PER_50MS - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      tick      <= '0;
      steps     <= '0;
      click_out <= 1'b0;
      x_out     <= '0;
      y_out     <= '0;
    end else begin
      click_out <= 1'b0;
      unique case (state)
        IDLE: if (detect_in) begin
          x_out <= x_in;
          y_out <= y_in;
          tick  <= '0;
          steps <= (delay_sel == 3'd0) ? 4'd1 : {1'b0, delay_sel};
          state <= DELAY;
        end
        DELAY, COOLDOWN: begin
          tick <= step_end ? '0 : tick + 1'b1;
          if (step_end) begin
            steps <= steps - 1'b1;
            if (steps == 4'd1) begin
              if (state == DELAY) begin
                click_out <= 1'b1;
                steps     <= 4'({cool_sel, 1'b0}) + 4'd2;   // 2 * (cool_sel + 1)
                state     <= COOLDOWN;
              end else begin
                state <= IDLE;
              end
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign waiting = (state == DELAY);
  assign cooling = (state == COOLDOWN);

endmodule
