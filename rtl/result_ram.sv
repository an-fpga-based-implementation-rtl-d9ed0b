// result_ram: the detection result memory, one bit per cell (1 x 256).
//
// The detector writes a cell's decision (1 = target) through the write
// port; the host reads the decisions through the read port. The read is
// synchronous: data one clock after the address. A write and a read of the
// same word in one clock return the old value. The size follows the source
// design's 1 x 256 result RAM; the two-port organisation is a choice of
// this design.
module result_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic          wdata_i,
  input  logic [AW-1:0] raddr_i,
  output logic          rdata_o
);
  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    rdata_o <= mem[raddr_i];
  end
endmodule
