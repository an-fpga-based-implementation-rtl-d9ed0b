// prc_sorter: Parallel Range Computing (PRC) sorter for the N reference cells.
//
// Every cell's rank (its position in ascending order) is computed at once:
// rank(i) = #{j : x_j < x_i} + #{j < i : x_j == x_i}. The tie term gives
// equal samples distinct ranks, so the ranks are a permutation of 0..N-1 and
// each cell is written to output slot rank(i). sorted_o[0] is X(1), the
// smallest; sorted_o[N-1] is X(N), the largest. N*(N-1) comparators and N
// N-way selectors, no iteration.
//
// Timing: start_i loads the comparison inputs; the sorted vector is
// registered and done_o pulses one clock later (latency 1, one sort per
// clock). The ranking rule and the single-cycle latency are choices of this
// design; that the sorter is a PRC unit in its own custom logic block
// follows the source architecture.
module prc_sorter
  import bacosd_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned N  = N_REF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic [DW-1:0] data_i   [N],
  output logic          done_o,
  output logic [DW-1:0] sorted_o [N]
);
  localparam int unsigned RW = $clog2(N);

  logic [RW-1:0] rank [N];
  logic [DW-1:0] scat [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      rank[i] = '0;
      for (int j = 0; j < N; j++) begin
        if (data_i[j] < data_i[i] || (j < i && data_i[j] == data_i[i]))
          rank[i] = rank[i] + 1'b1;
      end
    end
    for (int r = 0; r < N; r++) begin
      scat[r] = '0;
      for (int i = 0; i < N; i++)
        if (rank[i] == RW'(r)) scat[r] = scat[r] | data_i[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_o <= 1'b0;
      for (int r = 0; r < N; r++) sorted_o[r] <= '0;
    end else begin
      done_o <= start_i;
      if (start_i)
        for (int r = 0; r < N; r++) sorted_o[r] <= scat[r];
    end
  end
endmodule
