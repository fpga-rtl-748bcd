// fft_core: N-point streaming complex FFT engine (forward transform, unscaled).
//
// This is the 1D transform engine behind the row and column wrappers. The
// original system used the vendor FFT IP in this place; this module is a
// plain radix-2 decimation-in-time engine with the same role: accept N
// samples as a stream, compute, then emit N results as a stream.
//
// Operation, in three phases:
//   LOAD    s_ready=1. Each accepted sample k is stored at bit-reversed
//           index rev(k). Exactly N samples are taken; s_last is not needed.
//   COMPUTE log2(N) stages of N/2 butterflies, one butterfly per cycle on a
//           register array: a' = a + b*W, b' = a - b*W.
//   UNLOAD  m_valid=1 for N consecutive cycles, X[0] .. X[N-1] in natural
//           order, m_last on X[N-1]. There is no back-pressure.
// Latency per transform: N (load) + log2(N)*N/2 (compute) + N (unload) cycles.
//
// Arithmetic: the transform is not scaled (output = sum x[n] W^nk), like the
// original, so values grow by up to N. Twiddles are TW_FRAC-bit fixed point
// computed at elaboration; each product is rounded to an integer, so results
// are integers, as in the original. Internal words are DW bits and wrap if a
// value exceeds them (the user must size DW for its data).
module fft_core #(
  parameter int N       = 256,
  parameter int DW      = 32,
  parameter int TW_FRAC = 16,
  localparam int LOGN   = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst,
  // input stream
  input  logic                 s_valid,
  output logic                 s_ready,
  input  logic signed [DW-1:0] s_re,
  input  logic signed [DW-1:0] s_im,
  // output stream
  output logic                 m_valid,
  output logic                 m_last,
  output logic signed [DW-1:0] m_re,
  output logic signed [DW-1:0] m_im
);

  localparam int TW_W = TW_FRAC + 2;
  typedef logic signed [TW_W-1:0] tw_t;
  typedef tw_t tw_arr_t [N/2];

  // W^k = cos(2 pi k/N) - j sin(2 pi k/N), k = 0 .. N/2-1, scaled by 2^TW_FRAC
  function automatic tw_arr_t make_tw(input bit imag);
    tw_arr_t t;
    real ang, v;
    for (int k = 0; k < N/2; k++) begin
      ang  = 2.0 * 3.14159265358979323846 * k / N;
      v    = imag ? -$sin(ang) : $cos(ang);
      t[k] = tw_t'($rtoi($floor(v * (2.0 ** TW_FRAC) + 0.5)));
    end
    return t;
  endfunction

  localparam tw_arr_t TW_RE = make_tw(1'b0);
  localparam tw_arr_t TW_IM = make_tw(1'b1);

  function automatic logic [LOGN-1:0] bitrev(input logic [LOGN-1:0] v);
    for (int i = 0; i < LOGN; i++) bitrev[i] = v[LOGN-1-i];
  endfunction

  typedef enum logic [1:0] {LOAD, COMPUTE, UNLOAD} state_t;
  state_t state;

  logic signed [DW-1:0] mem_re [N];
  logic signed [DW-1:0] mem_im [N];

  logic [LOGN-1:0]         cnt;     // load / unload index, butterfly index
  logic [$clog2(LOGN)-1:0] stage;   // butterfly span is 2^stage

  // ---- butterfly addressing and arithmetic (COMPUTE) ----
  logic [LOGN-1:0] half, pos, i0, i1;
  logic [LOGN-2:0] tw_idx;
  logic signed [63:0] br, bi, wr, wi, pr, pi, tr, ti;

  always_comb begin
    half   = LOGN'(1) << stage;
    pos    = cnt & (half - 1'b1);
    i0     = ((cnt >> stage) << (stage + 1)) | pos;
    i1     = i0 | half;
    tw_idx = (LOGN-1)'(pos << (LOGN - 1 - int'(stage)));
    br = 64'(mem_re[i1]);
    bi = 64'(mem_im[i1]);
    wr = 64'(TW_RE[tw_idx]);
    wi = 64'(TW_IM[tw_idx]);
    pr = br * wr - bi * wi;
    pi = br * wi + bi * wr;
    tr = (pr + (64'sd1 <<< (TW_FRAC - 1))) >>> TW_FRAC;
    ti = (pi + (64'sd1 <<< (TW_FRAC - 1))) >>> TW_FRAC;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= LOAD;
      cnt   <= '0;
      stage <= '0;
    end else begin
      unique case (state)
        LOAD: if (s_valid) begin
          mem_re[bitrev(cnt)] <= s_re;
          mem_im[bitrev(cnt)] <= s_im;
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) begin
            state <= COMPUTE;
            stage <= '0;
          end
        end
        COMPUTE: begin
          mem_re[i0] <= mem_re[i0] + DW'(tr);
          mem_im[i0] <= mem_im[i0] + DW'(ti);
          mem_re[i1] <= mem_re[i0] - DW'(tr);
          mem_im[i1] <= mem_im[i0] - DW'(ti);
          if (cnt == LOGN'(N/2 - 1)) begin
            cnt <= '0;
            if (int'(stage) == LOGN - 1) state <= UNLOAD;
            else                         stage <= stage + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        UNLOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) state <= LOAD;
        end
        default: state <= LOAD;
      endcase
    end
  end

  assign s_ready = (state == LOAD);
  assign m_valid = (state == UNLOAD);
  assign m_last  = (state == UNLOAD) && (cnt == LOGN'(N - 1));
  assign m_re    = mem_re[cnt];
  assign m_im    = mem_im[cnt];

  initial assert (N >= 4 && (1 << LOGN) == N) else $error("N must be a power of two >= 4");

endmodule
