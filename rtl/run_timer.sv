// run_timer: cycle counter that times a detection run.
//
// clear_i resets the count to zero; every clock with run_i high adds one.
// The count saturates at all ones instead of wrapping. Reading the count
// after a run gives its length in clocks, from which the time per cell
// follows. The source design only says that timers monitor the timing of
// the detector; this counter is the simplest circuit that does so.
module run_timer #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear_i,
  input  logic         run_i,
  output logic [W-1:0] count_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     count_o <= '0;
    else if (clear_i)               count_o <= '0;
    else if (run_i && ~&count_o)    count_o <= count_o + 1'b1;
  end
endmodule
