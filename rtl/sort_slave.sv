// sort_slave: Avalon-MM slave port of the sorting custom logic.
//
// Lets a host processor use the PRC sorter on its own, one cell at a
// time, as the software-driven system does. Word address map:
//   0x00-0x0F  write: reference cell i (bits 15:0) into operand register i
//              read:  sorted output i, X(i+1) (ascending)
//   0x10       write: bit 0 = 1 starts a sort of the operand registers
//              read:  bit 0 done (set when the sort finishes, cleared by
//                     the next start), bit 1 sorter in use by the
//                     hardware sequencer (starts are then ignored)
// Reads have a fixed latency of one clock (avs_readdatavalid), no wait
// states. The sorter itself is outside this module; start_o and data_o go
// to it, sorted_i and done_i come back. That the sorter is a bus slave of
// its own follows the source system; the register map is this design's.
module sort_slave #(
  parameter int unsigned DW = 16,
  parameter int unsigned N  = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [4:0]    avs_address,
  input  logic          avs_read,
  input  logic          avs_write,
  input  logic [31:0]   avs_writedata,
  output logic [31:0]   avs_readdata,
  output logic          avs_readdatavalid,
  input  logic          lock_i,      // sorter owned by the sequencer
  output logic          start_o,
  output logic [DW-1:0] data_o   [N],
  input  logic          done_i,
  input  logic [DW-1:0] sorted_i [N]
);
  logic done_q;

  assign start_o = avs_write && avs_address == 5'h10 && avs_writedata[0] && !lock_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) data_o[i] <= '0;
      done_q            <= 1'b0;
      avs_readdata      <= '0;
      avs_readdatavalid <= 1'b0;
    end else begin
      if (avs_write && !avs_address[4])
        data_o[avs_address[3:0]] <= avs_writedata[DW-1:0];
      if (start_o)                done_q <= 1'b0;
      else if (done_i && !lock_i) done_q <= 1'b1;
      avs_readdatavalid <= avs_read;
      if (avs_read) begin
        if (!avs_address[4]) avs_readdata <= 32'(sorted_i[avs_address[3:0]]);
        else                 avs_readdata <= {30'd0, lock_i, done_q};
      end
    end
  end

  initial assert (N == 16) else $error("sort_slave: address map is for 16 cells");

  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(avs_read && avs_write))
    else $error("sort_slave: read and write together");
endmodule
