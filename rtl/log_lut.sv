// log_lut: the on-chip look-up ROM that turns a sample into its logarithm.
//
// The table has DEPTH entries addressed by the sample code; entry x holds
// floor(log2(x) * 2^LOG_FRAC), and entry 0 holds the value of entry 1.
// A sample beyond the table (x >= DEPTH) reads the last entry, so the
// input range of the table is 0 .. DEPTH-1 code steps. The contents are
// computed at elaboration by bacosd_pkg::log2_fix, not read from a file.
//
// Timing: synchronous ROM with two independent read ports (as a dual-port
// on-chip block ROM); data is valid one clock after the address. Port A
// serves the censoring logic, port B the host bus. The table size follows
// the published figure of about 2000 log values; the saturation of large
// samples and the base-2 fixed-point format are choices of this design.
module log_lut
  import bacosd_pkg::*;
#(
  parameter int unsigned DW    = DATA_W,
  parameter int unsigned DEPTH = LUT_DEPTH
) (
  input  logic          clk,
  input  logic [DW-1:0] addr_i,
  output log_t          data_o,
  input  logic [DW-1:0] addr_b_i,
  output log_t          data_b_o
);
  log_t rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = log2_fix(i);
  end

  // table index of a sample: saturates at the last entry
  function automatic logic [LUT_AW-1:0] index(input logic [DW-1:0] x);
    if (x >= DW'(DEPTH)) return LUT_AW'(DEPTH - 1);
    else                 return LUT_AW'(x);
  endfunction

  always_ff @(posedge clk) begin
    data_o   <= rom[index(addr_i)];
    data_b_o <= rom[index(addr_b_i)];
  end
endmodule
