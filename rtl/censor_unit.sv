// censor_unit: backward automatic censoring of the B-ACOSD detector.
//
// Given the reference cells sorted ascending, X(1) <= ... <= X(N), it tests
// from the top down: at step k (k = 0, 1, ...) the sample X(N-k) is compared
// with log T_ck = (1 - alpha_k) log X(1) + alpha_k log X(p). While the sample
// exceeds the threshold it is declared an interfering target, censored, and
// k grows; the search stops at the first sample that does not exceed its
// threshold, or after all N-p highest cells have been censored (k = N-p).
// The outputs are k, the number of interferers, and the logs the detection
// step needs: log X(1), log X(N-k) and log X0 of the cell under test.
//
// Logs come from the shared log ROM through lut_addr_o / lut_data_i (data
// one clock after the address). Handshake: start_i (one clock) latches the
// sorted cells and X0; done_o pulses when the outputs are valid; they hold
// until the next start. done_o is high 6 + k clocks after
// the clock in which start_i was high: one to latch, three ROM reads
// (X(1), X(p), X0), k + 1 tests at one per clock (the last one is the
// sample that stops the search, or X(p) when k reaches N-p) and one clock
// to register the result. start_i is ignored while busy.
// The algorithm and coefficients are the source design's; the sequential
// one-test-per-clock structure and the ROM-sharing read order are choices of
// this design.
module censor_unit
  import bacosd_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned N  = N_REF,
  parameter int unsigned P  = P_RANK
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic [DW-1:0] sorted_i [N],
  input  logic [DW-1:0] x0_i,
  output logic [DW-1:0] lut_addr_o,
  input  log_t          lut_data_i,
  output logic          busy_o,
  output logic          done_o,
  output logic [$clog2(N-P+1)-1:0] k_o,
  output log_t          l1_o,
  output log_t          lnk_o,
  output log_t          l0_o
);
  localparam int unsigned KW = $clog2(N-P+1);

  typedef enum logic [2:0] {S_IDLE, S_GET_L1, S_GET_LP, S_GET_L0, S_TEST, S_DONE} state_t;
  state_t state_q;

  logic [DW-1:0] srt_q [N];
  logic [DW-1:0] x0_q;
  logic [KW-1:0] k_q;
  log_t          l1_q, lp_q, l0_q, lnk_q;
  thr_t          tc;
  logic          censor;

  // T_ck for the current k, compared with log X(N-k) as it arrives.
  log_threshold u_tc (
    .l1_i   (l1_q),
    .lx_i   (lp_q),
    .coef_i (ALPHA[k_q[$clog2(N_CENS)-1:0]]),  // unused once k = N-p
    .thr_o  (tc)
  );

  assign censor = (k_q != KW'(N-P)) && ($signed({{(THR_W-LOG_W){1'b0}}, lut_data_i}) > tc);

  always_comb begin
    lut_addr_o = '0;
    case (state_q)
      S_IDLE:   lut_addr_o = sorted_i[0];
      S_GET_L1: lut_addr_o = srt_q[P-1];
      S_GET_LP: lut_addr_o = x0_q;
      S_GET_L0: lut_addr_o = srt_q[N-1];
      S_TEST:   lut_addr_o = srt_q[N-2-int'(k_q)];
      default:  lut_addr_o = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      for (int i = 0; i < N; i++) srt_q[i] <= '0;
      x0_q  <= '0;
      k_q   <= '0;
      l1_q  <= '0;
      lp_q  <= '0;
      l0_q  <= '0;
      lnk_q <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      case (state_q)
        S_IDLE: if (start_i) begin
          srt_q   <= sorted_i;
          x0_q    <= x0_i;
          k_q     <= '0;
          state_q <= S_GET_L1;
        end
        S_GET_L1: begin l1_q <= lut_data_i; state_q <= S_GET_LP; end
        S_GET_LP: begin lp_q <= lut_data_i; state_q <= S_GET_L0; end
        S_GET_L0: begin l0_q <= lut_data_i; state_q <= S_TEST;   end
        S_TEST: begin
          if (censor) begin
            k_q <= k_q + 1'b1;
          end else begin
            lnk_q   <= lut_data_i;
            state_q <= S_DONE;
          end
        end
        S_DONE: begin
          done_o  <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state_q != S_IDLE);
  assign k_o    = k_q;
  assign l1_o   = l1_q;
  assign lnk_o  = lnk_q;
  assign l0_o   = l0_q;

  initial begin
    assert (N - P == N_CENS)
      else $error("censor_unit: coefficient tables are for N - p = %0d", N_CENS);
  end
endmodule
