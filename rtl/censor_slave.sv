// censor_slave: Avalon-MM slave port of the censoring and detection
// custom logic.
//
// Lets a host processor run censoring and detection for one cell, given
// the sorted reference cells (for example read back from the sorter's
// port) and the cell under test. Word address map:
//   0x00-0x0F  write: sorted reference cell X(i+1), bits 15:0
//   0x10       write: cell under test X0, bits 15:0
//   0x11       write: bit 0 = 1 starts censoring, then detection
//   0x00       read:  bit 0 done (set when the decision is ready, cleared by
//                     the next start), bit 1 logic in use by the hardware
//                     sequencer (starts are then ignored)
//   0x01       read:  k, the number of censored interferers
//   0x02       read:  decision, bit 0 (1 = target)
//   0x03       read:  log threshold T_ak, signed, 8 fraction bits
// Reads have a fixed latency of one clock (avs_readdatavalid), no wait
// states. That censoring and part of the detection form one bus slave
// follows the source system; the register map is this design's.
module censor_slave
  import bacosd_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned N  = N_REF,
  parameter int unsigned KW = $clog2(N_CENS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [4:0]    avs_address,
  input  logic          avs_read,
  input  logic          avs_write,
  input  logic [31:0]   avs_writedata,
  output logic [31:0]   avs_readdata,
  output logic          avs_readdatavalid,
  input  logic          lock_i,      // logic owned by the sequencer
  output logic          start_o,
  output logic [DW-1:0] sorted_o [N],
  output logic [DW-1:0] x0_o,
  input  logic          done_i,      // detector done
  input  logic [KW-1:0] k_i,
  input  logic          target_i,
  input  thr_t          thr_i
);
  logic done_q;

  assign start_o = avs_write && avs_address == 5'h11 && avs_writedata[0] && !lock_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) sorted_o[i] <= '0;
      x0_o              <= '0;
      done_q            <= 1'b0;
      avs_readdata      <= '0;
      avs_readdatavalid <= 1'b0;
    end else begin
      if (avs_write && !avs_address[4])   sorted_o[avs_address[3:0]] <= avs_writedata[DW-1:0];
      if (avs_write && avs_address == 5'h10) x0_o <= avs_writedata[DW-1:0];
      if (start_o)                done_q <= 1'b0;
      else if (done_i && !lock_i) done_q <= 1'b1;
      avs_readdatavalid <= avs_read;
      if (avs_read) begin
        case (avs_address)
          5'h00:   avs_readdata <= {30'd0, lock_i, done_q};
          5'h01:   avs_readdata <= 32'(k_i);
          5'h02:   avs_readdata <= {31'd0, target_i};
          5'h03:   avs_readdata <= 32'(signed'(thr_i));
          default: avs_readdata <= '0;
        endcase
      end
    end
  end

  initial assert (N == 16) else $error("censor_slave: address map is for 16 cells");

  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(avs_read && avs_write))
    else $error("censor_slave: read and write together");
endmodule
