// tb_censor_unit: drives the censoring unit with sorted reference vectors
// of clutter plus 0..6 strong interferers, serving its log-ROM reads from a
// model table, and checks k, log X(1), log X(N-k), log X0 and the
// start-to-done latency of 6 + k clocks against the reference model. Every
// k from 0 to N-p must occur.
module tb_censor_unit;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [15:0] srt [N];
  logic [15:0] x0, laddr;
  logic [11:0] ldata;
  logic [2:0]  k;
  logic [11:0] l1, lnk, l0;
  int checks = 0, failures = 0;
  int seen_k [N-P+1];

  censor_unit dut (.clk, .rst_n, .start_i(start), .sorted_i(srt), .x0_i(x0),
                   .lut_addr_o(laddr), .lut_data_i(ldata), .busy_o(busy), .done_o(done),
                   .k_o(k), .l1_o(l1), .lnk_o(lnk), .l0_o(l0));

  always #5 clk = ~clk;
  always_ff @(posedge clk) ldata <= 12'(ref_log(int'(laddr)));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t v, s;
    int ek, lat, nint;
    foreach (srt[i]) srt[i] = 0;
    foreach (seen_k[i]) seen_k[i] = 0;
    x0 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      nint = int'($urandom_range(0, 6));
      for (int i = 0; i < N; i++)
        v[i] = (i < nint) ? int'($urandom_range(200, 2500)) : int'($urandom_range(1, 40));
      s = ref_sort(v);
      ek = ref_k(s);
      seen_k[ek]++;
      foreach (srt[i]) srt[i] = 16'(s[i]);
      x0 = 16'($urandom_range(0, 3000));
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      foreach (srt[i]) srt[i] = 16'($urandom);   // inputs are latched at start
      lat = 1;
      while (!done && lat < 40) begin @(negedge clk); lat++; end
      checks += 5;
      if (lat != 6 + ek) begin failures++; $display("t=%0d latency %0d, expected %0d", t, lat, 6 + ek); end
      if (int'(k) != ek) begin failures++; $display("t=%0d k=%0d expected %0d", t, k, ek); end
      if (int'(l1) != ref_log(s[0])) begin failures++; $display("t=%0d l1", t); end
      if (int'(lnk) != ref_log(s[N-1-ek])) begin failures++; $display("t=%0d lnk", t); end
      if (int'(l0) != ref_log(int'(x0))) begin failures++; $display("t=%0d l0", t); end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("still busy after done"); end
    end
    for (int i = 0; i <= N - P; i++) begin
      $display("k=%0d occurred %0d times", i, seen_k[i]);
      checks++;
      if (seen_k[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
