// ref_window: the tapped delay line of a CFAR detector.
//
// Samples enter serially at the leading end. The line holds
// N_REF + N_GUARD + 1 cells: N_REF/2 leading reference cells, N_GUARD/2
// guard cells, the cell under test X0, N_GUARD/2 guard cells and N_REF/2
// lagging reference cells. The guard cells are kept but not given to the
// detector. ref_o lists the reference cells in line order, leading ones
// first; X0 is cut_o.
//
// Timing: one sample is shifted in on every clock edge with shift_i high;
// the outputs are the registered line contents, so they show a sample the
// cycle after it was shifted in. Reset clears the line to zero.
// The layout follows the detector block diagram; reset value and the
// leading-first ordering of ref_o are choices of this design.
module ref_window
  import bacosd_pkg::*;
#(
  parameter int unsigned DW   = DATA_W,
  parameter int unsigned NREF = N_REF,
  parameter int unsigned NG   = N_GUARD
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift_i,
  input  logic [DW-1:0] sample_i,
  output logic [DW-1:0] ref_o [NREF],
  output logic [DW-1:0] cut_o
);
  localparam int unsigned LEN  = NREF + NG + 1;
  localparam int unsigned HALF = NREF / 2;
  localparam int unsigned CUT  = HALF + NG / 2;

  logic [DW-1:0] line_q [LEN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) line_q[i] <= '0;
    end else if (shift_i) begin
      line_q[0] <= sample_i;
      for (int i = 1; i < LEN; i++) line_q[i] <= line_q[i-1];
    end
  end

  always_comb begin
    for (int i = 0; i < HALF; i++) begin
      ref_o[i]        = line_q[i];
      ref_o[HALF + i] = line_q[CUT + NG/2 + 1 + i];
    end
  end

  assign cut_o = line_q[CUT];

  initial begin
    assert (NREF % 2 == 0 && NG % 2 == 0)
      else $error("ref_window: NREF and NG must be even");
  end
endmodule
