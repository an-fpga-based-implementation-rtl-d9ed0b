// tb_detector: random k, log X(1), log X(N-k) and log X0, with X0 placed
// near the threshold so both decisions occur; checks the decision, the
// threshold and the one-clock latency against the reference model.
module tb_detector;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done, target;
  logic [2:0] k;
  logic [11:0] l1, lnk, l0;
  logic signed [15:0] thr;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  detector dut (.clk, .rst_n, .start_i(start), .k_i(k), .l1_i(l1), .lnk_i(lnk), .l0_i(l0),
                .done_o(done), .target_o(target), .thr_o(thr));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, kk, t_ref, x;
    k = 0; l1 = 0; lnk = 0; l0 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      kk = int'($urandom_range(0, N - P));
      a  = int'($urandom_range(0, 1500));
      b  = a + int'($urandom_range(0, 1000));
      t_ref = ref_thr(a, b, beta_q(kk));
      x = t_ref + int'($urandom_range(0, 8)) - 4;
      if (x < 0) x = 0;
      if (x > 4095) x = 4095;
      k = 3'(kk); l1 = 12'(a); lnk = 12'(b); l0 = 12'(x);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      k = 3'($urandom); l1 = 12'($urandom);        // results must hold
      checks += 3;
      if (!done) begin failures++; $display("done missing"); end
      if (int'(thr) != t_ref) begin failures++; $display("thr %0d != %0d", thr, t_ref); end
      if (target != (x > t_ref)) begin failures++; $display("target wrong x=%0d t=%0d", x, t_ref); end
      if (target) hits++; else misses++;
      @(negedge clk);
      checks++;
      if (done || int'(thr) != t_ref) begin failures++; $display("result did not hold"); end
    end
    checks++;
    if (hits == 0 || misses == 0) failures++;
    $display("targets %0d, no targets %0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
