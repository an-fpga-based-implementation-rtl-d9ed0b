// onchip_ram: on-chip RAM with an Avalon memory-mapped slave port.
//
// The processor's instruction and data memories (128K x 32 and 64K x 16 in
// the source system) are instances of this block. Word addressed; a write
// stores writedata at address; a read returns the word with
// readdatavalid high one clock later (fixed read latency 1, no wait
// states, so no waitrequest). Only the memory sizes come from the source
// design; the port timing is a choice of this design.
module onchip_ram #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 131072,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] avs_address,
  input  logic          avs_read,
  input  logic          avs_write,
  input  logic [DW-1:0] avs_writedata,
  output logic [DW-1:0] avs_readdata,
  output logic          avs_readdatavalid
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (avs_write) mem[avs_address] <= avs_writedata;
    avs_readdata <= mem[avs_address];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) avs_readdatavalid <= 1'b0;
    else        avs_readdatavalid <= avs_read;
  end

  property p_no_rw;
    @(posedge clk) disable iff (!rst_n) !(avs_read && avs_write);
  endproperty
  a_no_rw: assert property (p_no_rw) else $error("onchip_ram: read and write together");
endmodule
