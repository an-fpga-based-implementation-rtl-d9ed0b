// tb_censor_slave: drives the censoring/detection logic's slave port with
// the censor unit, detector and log ROM behind it, as in the system:
// writes sorted reference cells and X0, starts, polls done and reads k,
// the decision and the threshold, compared with the reference model.
// Cells are built so that every k from 0 to N-p and both decisions occur.
// Also checks the lock (start ignored, status bit 1).
module tb_censor_slave;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] a; logic rd = 0, wr = 0; logic [31:0] wd, rdata; logic rv;
  logic lock = 0, start, cdone, ddone, target;
  logic [15:0] srt [N];
  logic [15:0] x0, laddr;
  logic [11:0] ldata, l1, lnk, l0, unused_b;
  logic [2:0] k;
  logic signed [15:0] thr;
  int checks = 0, failures = 0;
  int seen_k [N-P+1];
  int hits = 0, misses = 0;

  censor_slave dut (.clk, .rst_n, .avs_address(a), .avs_read(rd), .avs_write(wr), .avs_writedata(wd),
    .avs_readdata(rdata), .avs_readdatavalid(rv), .lock_i(lock), .start_o(start), .sorted_o(srt),
    .x0_o(x0), .done_i(ddone), .k_i(k), .target_i(target), .thr_i(thr));
  censor_unit u_cens (.clk, .rst_n, .start_i(start), .sorted_i(srt), .x0_i(x0), .lut_addr_o(laddr),
    .lut_data_i(ldata), .busy_o(), .done_o(cdone), .k_o(k), .l1_o(l1), .lnk_o(lnk), .l0_o(l0));
  detector u_det (.clk, .rst_n, .start_i(cdone), .k_i(k), .l1_i(l1), .lnk_i(lnk), .l0_i(l0),
    .done_o(ddone), .target_o(target), .thr_o(thr));
  log_lut u_lut (.clk, .addr_i(laddr), .data_o(ldata), .addr_b_i(16'd0), .data_b_o(unused_b));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bw(int ad, int d);
    @(negedge clk) a = 5'(ad); wd = d; wr = 1;
    @(negedge clk) wr = 0;
  endtask
  task automatic br(int ad, output int d);
    @(negedge clk) a = 5'(ad); rd = 1;
    @(negedge clk) rd = 0;
    checks++;
    if (!rv) begin failures++; $display("readdatavalid missing"); end
    d = int'(rdata);
  endtask

  initial begin
    vec_t v, s;
    int d, st, xx, kr, n;
    bit tr;
    a = 0; wd = 0;
    foreach (seen_k[i]) seen_k[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic int nint = int'($urandom_range(0, 6));
      for (int i = 0; i < N; i++)
        v[i] = (i < nint) ? int'($urandom_range(300, 1990)) : int'($urandom_range(30, 60));
      s = ref_sort(v);
      xx = int'($urandom_range(30, 1990));
      tr = ref_target(v, xx, kr);
      seen_k[kr]++;
      if (tr) hits++; else misses++;
      for (int i = 0; i < N; i++) bw(i, s[i]);
      bw(16, xx);
      bw(17, 1);
      n = 0;
      do begin br(0, st); n++; end while ((st & 1) == 0 && n < 40);
      checks++;
      if (st != 1) begin failures++; $display("status %0d", st); end
      br(1, d);
      checks++;
      if (d != kr) begin failures++; $display("t=%0d k %0d != %0d", t, d, kr); end
      br(2, d);
      checks++;
      if (d != int'(tr)) begin failures++; $display("t=%0d decision %0d != %0d", t, d, tr); end
      br(3, d);
      checks++;
      if (d != ref_thr(ref_log(s[0]), ref_log(s[N-1-kr]), beta_q(kr))) begin failures++; $display("t=%0d thr %0d", t, d); end
      if (t % 20 == 0) begin
        @(negedge clk) lock = 1;
        bw(17, 1);                     // ignored: nothing starts
        repeat (12) @(negedge clk);
        br(0, st);
        checks++;
        if (st != 3) begin failures++; $display("locked status %0d", st); end
        @(negedge clk) lock = 0;
      end
    end
    for (int i = 0; i <= N - P; i++) begin
      checks++;
      if (seen_k[i] == 0) begin failures++; $display("k = %0d never occurred", i); end
    end
    checks++;
    if (hits == 0 || misses == 0) failures++;
    $display("targets %0d, no targets %0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
