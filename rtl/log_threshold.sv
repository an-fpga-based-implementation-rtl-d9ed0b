// log_threshold: one log-domain CFAR threshold.
//
// Computes log T = (1 - c) * log X(1) + c * log X, the log form of
// T = X(1)^(1-c) * X^c, which replaces both powers by one product. It is
// evaluated as log X(1) + c * (log X - log X(1)): the same value with one
// multiplier instead of two. Logs are unsigned LOG_W-bit numbers with
// LOG_FRAC fraction bits, c is an unsigned COEF_W-bit number with COEF_FRAC
// fraction bits; the product is truncated toward minus infinity and the
// result is a signed THR_W-bit log (it goes below zero when c > 1 and
// log X < log X(1) cannot occur for sorted inputs, but is kept signed).
//
// Timing: purely combinational. The log form is the source design's; the
// single-multiplier rearrangement and the rounding are choices of this design.
module log_threshold
  import bacosd_pkg::*;
(
  input  log_t  l1_i,    // log X(1)
  input  log_t  lx_i,    // log X(p) or log X(N-k)
  input  coef_t coef_i,  // alpha_k or beta_k
  output thr_t  thr_o
);
  localparam int unsigned PW = LOG_W + 1 + COEF_W + 1;

  logic signed [LOG_W:0]  diff;
  logic signed [PW-1:0]   prod;

  always_comb begin
    diff  = $signed({1'b0, lx_i}) - $signed({1'b0, l1_i});
    prod  = diff * $signed({1'b0, coef_i});
    thr_o = thr_t'($signed({1'b0, l1_i})) + thr_t'(prod >>> COEF_FRAC);
  end
endmodule
