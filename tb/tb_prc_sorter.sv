// tb_prc_sorter: sorts random 16-cell vectors (wide-range values, values
// drawn from a small set to force ties, and constant vectors) and compares
// with an insertion sort. Checks that done follows start by one clock and
// that the output holds when start is low.
module tb_prc_sorter;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [15:0] din [N];
  logic [15:0] dout [N];
  int checks = 0, failures = 0;

  prc_sorter dut (.clk, .rst_n, .start_i(start), .data_i(din), .done_o(done), .sorted_o(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t v, s;
    foreach (din[i]) din[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      for (int i = 0; i < N; i++) begin
        case (t % 3)
          0: v[i] = int'($urandom_range(0, 65535));
          1: v[i] = int'($urandom_range(0, 4));
          default: v[i] = (t % 7 == 2) ? 77 : int'($urandom_range(60000, 65535));
        endcase
        din[i] = 16'(v[i]);
      end
      s = ref_sort(v);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      checks++;
      if (!done) begin failures++; $display("done not one clock after start"); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(dout[i]) != s[i]) begin
          failures++;
          if (failures < 10) $display("t=%0d slot %0d: %0d != %0d", t, i, dout[i], s[i]);
        end
      end
      // output holds while start is low
      foreach (din[i]) din[i] = 16'($urandom);
      @(negedge clk);
      checks++;
      if (done || int'(dout[N-1]) != s[N-1]) begin failures++; $display("output did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
