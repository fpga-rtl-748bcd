// elementwise_mult: multiplies the image spectrum by the kernel spectrum.
//
// Walks all 32768 matrix addresses. For each one it reads the image word
// (a + bj) from the matrix RAM and the kernel word (c + dj) from the kernel
// ROM at the same address, and writes (ac - bd) + (ad + bc)j back to that
// address, saturated to 25 bits per component.
//
// States, as published: IDLE (wait for start, address 0) -> READ_WAIT (two
// cycles: both memories have 2-cycle read latency) -> MULT_WRITE (multiply
// and write; after address 32767 pulse done and return to IDLE) ->
// ADDR_INC (next address; a separate cycle because the RAM has only one
// port) -> READ_WAIT. That is 4 cycles per word, 131072 cycles in total.
module elementwise_mult
  import fpga_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output mat_req_t          ram_req,
  input  cplx_t             ram_rdata,
  output logic [MAT_AW-1:0] rom_addr,
  input  cplx_t             rom_rdata
);

  typedef enum logic [1:0] {IDLE, READ_WAIT, MULT_WRITE, ADDR_INC} state_t;
  state_t state;

  logic [MAT_AW-1:0] addr;
  logic              wait_cnt;
  logic signed [63:0] a, b, c, d;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      addr     <= '0;
      wait_cnt <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          addr     <= '0;
          wait_cnt <= 1'b0;
          state    <= READ_WAIT;
        end
        READ_WAIT: begin
          wait_cnt <= ~wait_cnt;
          if (wait_cnt) state <= MULT_WRITE;
        end
        MULT_WRITE: begin
          if (addr == MAT_AW'(MAT_WORDS - 1)) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            state <= ADDR_INC;
          end
        end
        ADDR_INC: begin
          addr     <= addr + 1'b1;
          wait_cnt <= 1'b0;
          state    <= READ_WAIT;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    a = 64'(ram_rdata.re);
    b = 64'(ram_rdata.im);
    c = 64'(rom_rdata.re);
    d = 64'(rom_rdata.im);
    ram_req          = '0;
    ram_req.addr     = addr;
    ram_req.we       = (state == MULT_WRITE);
    ram_req.wdata.re = sat_comp(a * c - b * d);
    ram_req.wdata.im = sat_comp(a * d + b * c);
  end

  assign rom_addr = addr;
  assign busy     = (state != IDLE);

endmodule
