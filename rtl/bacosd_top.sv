// bacosd_top: B-ACOSD CFAR target detector system.
//
// The detector decides, for every cell of a 256-sample radar data set,
// whether it holds a target, against an adaptive threshold built from
// the 16 reference cells around it (one guard cell on each side). The
// reference cells are sorted (PRC sorter), the largest ones are censored
// as interfering targets while they exceed a log-domain threshold between
// X(1) and X(p) (censor unit, p = 12), and the cell under test is compared
// with a threshold between X(1) and the largest uncensored cell X(N-k)
// (detector). All logs come from one on-chip log ROM.
//
// Data path per cell: sample memory -> reference window -> PRC sorter ->
// censor unit (reads the log ROM) -> detector -> result memory, stepped
// by the sequencer. The host (the soft processor of the source system,
// which is not part of this RTL) sees these Avalon-MM slave ports; the bus
// fabric that would join them to the processor is outside this RTL:
//   avs_*   whole-block detector: samples, start, results (cfar_avalon_slave)
//   cl1_*   the sorting custom logic on its own, one cell (sort_slave)
//   cl2_*   the censoring and detection custom logic, one cell (censor_slave)
//   lut_*   the log look-up memory, read only, data = log2(x) * 256
//   imem_*, dmem_*  the processor's instruction (128K x 32) and data
//           (64K x 16) RAMs
// The per-cell ports let software run the detector cell by cell, as the
// source system does; the whole-block port runs it in hardware. The sorter,
// censor unit and detector are shared: while a block run is busy they
// belong to the sequencer and starts from cl1_* / cl2_* are ignored; a
// block run should not be started while a per-cell operation is in flight.
//
// Timing: one clock domain, active-low asynchronous reset. A cell with k
// censored interferers takes 11 + k clocks, an edge cell 2. A full run of 256 samples takes
// about 3000 to 4000 clocks depending on the data.
module bacosd_top
  import bacosd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // detector slave port
  input  logic [9:0]  avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  output logic        avs_readdatavalid,
  // sorting custom logic slave port
  input  logic [4:0]  cl1_address,
  input  logic        cl1_read,
  input  logic        cl1_write,
  input  logic [31:0] cl1_writedata,
  output logic [31:0] cl1_readdata,
  output logic        cl1_readdatavalid,
  // censoring / detection custom logic slave port
  input  logic [4:0]  cl2_address,
  input  logic        cl2_read,
  input  logic        cl2_write,
  input  logic [31:0] cl2_writedata,
  output logic [31:0] cl2_readdata,
  output logic        cl2_readdatavalid,
  // log look-up memory slave port (read only)
  input  logic [15:0] lut_address,
  input  logic        lut_read,
  output logic [31:0] lut_readdata,
  output logic        lut_readdatavalid,
  // instruction memory slave port
  input  logic [16:0] imem_address,
  input  logic        imem_read,
  input  logic        imem_write,
  input  logic [31:0] imem_writedata,
  output logic [31:0] imem_readdata,
  output logic        imem_readdatavalid,
  // data memory slave port
  input  logic [15:0] dmem_address,
  input  logic        dmem_read,
  input  logic        dmem_write,
  input  logic [15:0] dmem_writedata,
  output logic [15:0] dmem_readdata,
  output logic        dmem_readdatavalid,
  // end of run, for an interrupt or a poll
  output logic        run_done_o
);
  localparam int unsigned AW  = $clog2(N_CELLS);
  localparam int unsigned LEN = N_REF + N_GUARD + 1;
  localparam int unsigned CUT = N_REF / 2 + N_GUARD / 2;
  localparam int unsigned KW  = $clog2(N_CENS + 1);

  // bus side
  logic          smem_we;
  logic [AW-1:0] smem_addr, res_raddr;
  logic [15:0]   smem_wdata, smem_rdata;
  logic          res_rdata;
  logic          start, busy, done;
  logic [15:0]   det_count;
  logic [31:0]   cycles;

  // detector side
  logic [AW-1:0] seq_addr;
  sample_t       seq_sample;
  logic          shift, cell_start;
  logic          res_we, res_wdata;
  logic [AW-1:0] res_waddr;
  sample_t       refc [N_REF];
  sample_t       cut;
  logic          sort_done;
  sample_t       sorted [N_REF];
  sample_t       lut_addr;
  log_t          lut_data;
  logic          cens_done;
  logic [KW-1:0] k;
  log_t          l1, lnk, l0;
  logic          det_done, target;
  thr_t          thr;

  // per-cell (software) path
  logic          cl1_start, cl2_start;
  sample_t       cl1_data [N_REF];
  sample_t       cl2_sorted [N_REF];
  sample_t       cl2_x0;
  logic          sort_start, cens_start;
  sample_t       sort_in [N_REF];
  sample_t       cens_in [N_REF];
  sample_t       cens_x0;
  log_t          lut_data_b;

  cfar_avalon_slave #(.AW(AW)) u_slave (
    .clk, .rst_n,
    .avs_address, .avs_read, .avs_write, .avs_writedata,
    .avs_readdata, .avs_readdatavalid,
    .smem_we_o   (smem_we),
    .smem_addr_o (smem_addr),
    .smem_wdata_o(smem_wdata),
    .smem_rdata_i(smem_rdata),
    .res_addr_o  (res_raddr),
    .res_rdata_i (res_rdata),
    .start_o     (start),
    .busy_i      (busy),
    .done_i      (done),
    .det_count_i (det_count),
    .cycles_i    (cycles)
  );

  sample_mem #(.DW(DATA_W), .DEPTH(N_CELLS)) u_smem (
    .clk,
    .a_we_i   (smem_we),
    .a_addr_i (smem_addr),
    .a_wdata_i(smem_wdata),
    .a_rdata_o(smem_rdata),
    .b_addr_i (seq_addr),
    .b_rdata_o(seq_sample)
  );

  cfar_sequencer #(.NC(N_CELLS), .LEN(LEN), .CUT(CUT)) u_seq (
    .clk, .rst_n,
    .start_i     (start),
    .busy_o      (busy),
    .done_o      (done),
    .mem_addr_o  (seq_addr),
    .shift_o     (shift),
    .cell_start_o(cell_start),
    .cell_done_i (det_done),
    .target_i    (target),
    .res_we_o    (res_we),
    .res_addr_o  (res_waddr),
    .res_data_o  (res_wdata),
    .det_count_o (det_count)
  );

  run_timer #(.W(32)) u_timer (
    .clk, .rst_n,
    .clear_i(start),
    .run_i  (busy),
    .count_o(cycles)
  );

  ref_window u_win (
    .clk, .rst_n,
    .shift_i (shift),
    .sample_i(seq_sample),
    .ref_o   (refc),
    .cut_o   (cut)
  );

  sort_slave #(.DW(DATA_W), .N(N_REF)) u_cl1 (
    .clk, .rst_n,
    .avs_address      (cl1_address),
    .avs_read         (cl1_read),
    .avs_write        (cl1_write),
    .avs_writedata    (cl1_writedata),
    .avs_readdata     (cl1_readdata),
    .avs_readdatavalid(cl1_readdatavalid),
    .lock_i  (busy),
    .start_o (cl1_start),
    .data_o  (cl1_data),
    .done_i  (sort_done),
    .sorted_i(sorted)
  );

  censor_slave u_cl2 (
    .clk, .rst_n,
    .avs_address      (cl2_address),
    .avs_read         (cl2_read),
    .avs_write        (cl2_write),
    .avs_writedata    (cl2_writedata),
    .avs_readdata     (cl2_readdata),
    .avs_readdatavalid(cl2_readdatavalid),
    .lock_i  (busy),
    .start_o (cl2_start),
    .sorted_o(cl2_sorted),
    .x0_o    (cl2_x0),
    .done_i  (det_done),
    .k_i     (k),
    .target_i(target),
    .thr_i   (thr)
  );

  // The sequencer owns the shared datapath while a block run is busy.
  always_comb begin
    sort_start = busy ? cell_start : cl1_start;
    cens_start = busy ? sort_done  : cl2_start;
    sort_in    = busy ? refc       : cl1_data;
    cens_in    = busy ? sorted     : cl2_sorted;
    cens_x0    = busy ? cut        : cl2_x0;
  end

  prc_sorter u_sort (
    .clk, .rst_n,
    .start_i (sort_start),
    .data_i  (sort_in),
    .done_o  (sort_done),
    .sorted_o(sorted)
  );

  log_lut u_lut (
    .clk,
    .addr_i  (lut_addr),
    .data_o  (lut_data),
    .addr_b_i(lut_address),
    .data_b_o(lut_data_b)
  );

  assign lut_readdata = 32'(lut_data_b);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lut_readdatavalid <= 1'b0;
    else        lut_readdatavalid <= lut_read;
  end

  // The cell under test is held in the window while the cell is processed:
  // the sequencer shifts only after the detector has finished.
  censor_unit u_cens (
    .clk, .rst_n,
    .start_i   (cens_start),
    .sorted_i  (cens_in),
    .x0_i      (cens_x0),
    .lut_addr_o(lut_addr),
    .lut_data_i(lut_data),
    .busy_o    (),
    .done_o    (cens_done),
    .k_o       (k),
    .l1_o      (l1),
    .lnk_o     (lnk),
    .l0_o      (l0)
  );

  detector u_det (
    .clk, .rst_n,
    .start_i (cens_done),
    .k_i     (k),
    .l1_i    (l1),
    .lnk_i   (lnk),
    .l0_i    (l0),
    .done_o  (det_done),
    .target_o(target),
    .thr_o   (thr)
  );

  result_ram #(.DEPTH(N_CELLS)) u_res (
    .clk,
    .we_i   (res_we),
    .waddr_i(res_waddr),
    .wdata_i(res_wdata),
    .raddr_i(res_raddr),
    .rdata_o(res_rdata)
  );

  onchip_ram #(.DW(32), .DEPTH(131072)) u_imem (
    .clk, .rst_n,
    .avs_address      (imem_address),
    .avs_read         (imem_read),
    .avs_write        (imem_write),
    .avs_writedata    (imem_writedata),
    .avs_readdata     (imem_readdata),
    .avs_readdatavalid(imem_readdatavalid)
  );

  onchip_ram #(.DW(16), .DEPTH(65536)) u_dmem (
    .clk, .rst_n,
    .avs_address      (dmem_address),
    .avs_read         (dmem_read),
    .avs_write        (dmem_write),
    .avs_writedata    (dmem_writedata),
    .avs_readdata     (dmem_readdata),
    .avs_readdatavalid(dmem_readdatavalid)
  );

  assign run_done_o = done;
endmodule
