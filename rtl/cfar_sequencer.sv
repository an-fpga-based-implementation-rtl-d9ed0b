// cfar_sequencer: steps the detector across a run of NC samples.
//
// After start_i it reads the samples in order from the sample memory and
// shifts each into the reference window. Once the window is full (LEN
// samples in, LEN = N_REF + N_GUARD + 1) every new sample makes a new cell
// the cell under test: the sequencer pulses cell_start_o (sort, censor,
// detect) and waits for cell_done_i, then writes target_i to the result
// memory at the index of the cell under test, sample i - CUT. The first and
// last CUT cells never have a full window; their results are written as 0
// (no target). det_count_o counts the targets of the run.
//
// Per sample: one clock to address the memory, one to shift, then for a
// full window one clock to start the cell and the cell's own latency.
// busy_o is high from the clock after start_i until done_o pulses; start_i
// is ignored while busy. In the source system this loop is software on the
// processor, which calls the sorter and the censoring logic; here it is a
// state machine, and the handling of the edge cells is a choice of this
// design.
module cfar_sequencer #(
  parameter int unsigned NC  = 256,
  parameter int unsigned LEN = 19,
  parameter int unsigned CUT = 9,
  parameter int unsigned AW  = $clog2(NC)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  output logic          busy_o,
  output logic          done_o,
  output logic [AW-1:0] mem_addr_o,
  output logic          shift_o,
  output logic          cell_start_o,
  input  logic          cell_done_i,
  input  logic          target_i,
  output logic          res_we_o,
  output logic [AW-1:0] res_addr_o,
  output logic          res_data_o,
  output logic [15:0]   det_count_o
);
  typedef enum logic [2:0] {S_IDLE, S_READ, S_SHIFT, S_START, S_WAIT, S_TAIL, S_FIN} state_t;
  state_t state_q;

  logic [AW-1:0] i_q;   // index of the sample being read / last shifted
  logic [AW-1:0] c_q;   // index of the trailing edge cell being cleared

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      i_q         <= '0;
      c_q         <= '0;
      det_count_o <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (start_i) begin
          i_q         <= '0;
          det_count_o <= '0;
          state_q     <= S_READ;
        end
        S_READ:  state_q <= S_SHIFT;
        S_SHIFT: begin
          if (32'(i_q) >= LEN - 1) state_q <= S_START;
          else if (32'(i_q) == NC - 1) begin
            c_q <= AW'(NC - CUT);
            state_q <= S_TAIL;
          end else begin
            i_q <= i_q + 1'b1;
            state_q <= S_READ;
          end
        end
        S_START: state_q <= S_WAIT;
        S_WAIT: if (cell_done_i) begin
          if (target_i) det_count_o <= det_count_o + 1'b1;
          if (32'(i_q) == NC - 1) begin
            c_q     <= AW'(NC - CUT);
            state_q <= S_TAIL;
          end else begin
            i_q     <= i_q + 1'b1;
            state_q <= S_READ;
          end
        end
        S_TAIL: begin
          c_q <= c_q + 1'b1;
          if (32'(c_q) == NC - 1) state_q <= S_FIN;
        end
        S_FIN:   state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_addr_o   = i_q;
    shift_o      = (state_q == S_SHIFT);
    cell_start_o = (state_q == S_START);
    res_we_o     = 1'b0;
    res_addr_o   = '0;
    res_data_o   = 1'b0;
    if (state_q == S_SHIFT && 32'(i_q) < CUT) begin
      res_we_o   = 1'b1;                 // leading edge cell
      res_addr_o = i_q;
    end else if (state_q == S_WAIT && cell_done_i) begin
      res_we_o   = 1'b1;
      res_addr_o = i_q - AW'(CUT);
      res_data_o = target_i;
    end else if (state_q == S_TAIL) begin
      res_we_o   = 1'b1;                 // trailing edge cell
      res_addr_o = c_q;
    end
  end

  assign busy_o = (state_q != S_IDLE);
  assign done_o = (state_q == S_FIN);

  initial begin
    assert (NC > LEN && LEN > CUT) else $error("cfar_sequencer: need NC > LEN > CUT");
  end
endmodule
