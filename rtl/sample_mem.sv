// sample_mem: the input sample memory, DEPTH words of DW bits (256 x 16).
//
// Holds the data set one detection run works through. Port A belongs to the
// host bus: it writes samples and reads them back. Port B is the detector's
// read port. Both reads are synchronous (data one clock after the address),
// as in an on-chip block RAM. The size follows the source design's test
// set-up, where the samples sit in a 16 x 256 ROM; making it writable from
// the bus, instead of fixed at configuration, is a choice of this design.
module sample_mem #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we_i,
  input  logic [AW-1:0] a_addr_i,
  input  logic [DW-1:0] a_wdata_i,
  output logic [DW-1:0] a_rdata_o,
  input  logic [AW-1:0] b_addr_i,
  output logic [DW-1:0] b_rdata_o
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we_i) mem[a_addr_i] <= a_wdata_i;
    a_rdata_o <= mem[a_addr_i];
    b_rdata_o <= mem[b_addr_i];
  end
endmodule
