// cfar_avalon_slave: Avalon memory-mapped slave port of the CFAR detector.
//
// Word address map (ADDR_W = 10):
//   0x000-0x0FF  sample memory, read/write, bits 15:0
//   0x100-0x1FF  result memory, read only, bit 0 = target in that cell
//   0x200        write: bit 0 = 1 starts a run
//                read:  bit 0 busy, bit 1 done (set at the end of a run,
//                       cleared by the next start)
//   0x201        read: number of targets found in the last run
//   0x202        read: clock cycles of the last run (run timer)
// Reads have a fixed latency of one clock, signalled by avs_readdatavalid;
// there are no wait states. Writes to read-only words are ignored.
// The source system attaches its custom logic to the bus through slave
// ports only; this register map is a choice of this design.
module cfar_avalon_slave #(
  parameter int unsigned AW = 8   // sample / result memory address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [9:0]    avs_address,
  input  logic          avs_read,
  input  logic          avs_write,
  input  logic [31:0]   avs_writedata,
  output logic [31:0]   avs_readdata,
  output logic          avs_readdatavalid,
  // sample memory port A
  output logic          smem_we_o,
  output logic [AW-1:0] smem_addr_o,
  output logic [15:0]   smem_wdata_o,
  input  logic [15:0]   smem_rdata_i,
  // result memory read port
  output logic [AW-1:0] res_addr_o,
  input  logic          res_rdata_i,
  // control and status
  output logic          start_o,
  input  logic          busy_i,
  input  logic          done_i,
  input  logic [15:0]   det_count_i,
  input  logic [31:0]   cycles_i
);
  typedef enum logic [1:0] {SEL_SMEM, SEL_RES, SEL_REG} sel_t;

  sel_t        sel_q;
  logic        done_q;
  logic [31:0] reg_rdata_q;

  always_comb begin
    smem_addr_o  = avs_address[AW-1:0];
    res_addr_o   = avs_address[AW-1:0];
    smem_wdata_o = avs_writedata[15:0];
    smem_we_o    = avs_write && avs_address[9:8] == 2'b00;
    start_o      = avs_write && avs_address == 10'h200 && avs_writedata[0] && !busy_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q             <= SEL_REG;
      done_q            <= 1'b0;
      reg_rdata_q       <= '0;
      avs_readdatavalid <= 1'b0;
    end else begin
      avs_readdatavalid <= avs_read;
      if (start_o)     done_q <= 1'b0;
      else if (done_i) done_q <= 1'b1;
      if (avs_read) begin
        case (avs_address[9:8])
          2'b00:   sel_q <= SEL_SMEM;
          2'b01:   sel_q <= SEL_RES;
          default: sel_q <= SEL_REG;
        endcase
        case (avs_address)
          10'h200: reg_rdata_q <= {30'd0, done_q, busy_i};
          10'h201: reg_rdata_q <= {16'd0, det_count_i};
          10'h202: reg_rdata_q <= cycles_i;
          default: reg_rdata_q <= '0;
        endcase
      end
    end
  end

  always_comb begin
    case (sel_q)
      SEL_SMEM: avs_readdata = {16'd0, smem_rdata_i};
      SEL_RES:  avs_readdata = {31'd0, res_rdata_i};
      default:  avs_readdata = reg_rdata_q;
    endcase
  end

  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(avs_read && avs_write))
    else $error("cfar_avalon_slave: read and write together");
endmodule
