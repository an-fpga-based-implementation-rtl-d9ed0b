// detector: the detection step of the B-ACOSD detector.
//
// With k interfering targets found by the censoring step, the adaptive
// threshold is log T_ak = (1 - beta_k) log X(1) + beta_k log X(N-k), and the
// cell under test is declared a target (H1) when log X0 > log T_ak, no
// target (H0) otherwise. beta_k comes from the coefficient table for
// Pfa = 0.001.
//
// Timing: start_i (one clock) with valid inputs; target_o and thr_o are
// registered and done_o pulses the next clock (latency 1). Results hold
// until the next start. The equations are the source design's; the fixed
// point format and the strict ">" on equal logs are choices of this design.
module detector
  import bacosd_pkg::*;
#(
  parameter int unsigned KW = $clog2(N_CENS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic [KW-1:0] k_i,
  input  log_t          l1_i,
  input  log_t          lnk_i,
  input  log_t          l0_i,
  output logic          done_o,
  output logic          target_o,
  output thr_t          thr_o
);
  thr_t ta;

  log_threshold u_ta (
    .l1_i   (l1_i),
    .lx_i   (lnk_i),
    .coef_i (BETA[(k_i <= KW'(N_CENS)) ? k_i : KW'(N_CENS)]),
    .thr_o  (ta)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_o   <= 1'b0;
      target_o <= 1'b0;
      thr_o    <= '0;
    end else begin
      done_o <= start_i;
      if (start_i) begin
        target_o <= $signed({{(THR_W-LOG_W){1'b0}}, l0_i}) > ta;
        thr_o    <= ta;
      end
    end
  end
endmodule
