// tb_sort_slave: drives the sorting logic's slave port with a PRC sorter
// behind it, as in the system: writes 16 reference cells, starts, polls
// done, reads the sorted cells and compares with an insertion sort. Also
// checks that done is cleared by a start, that starts are ignored and done
// is not raised while the sorter is locked by the sequencer, and the
// status word.
module tb_sort_slave;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] a; logic rd = 0, wr = 0; logic [31:0] wd, rdata; logic rv;
  logic lock = 0, start, sdone, lstart = 0;
  logic [15:0] ops [N];
  logic [15:0] srt [N];
  logic [15:0] lockdata [N];
  logic [15:0] sin [N];
  always_comb sin = lock ? lockdata : ops;
  int checks = 0, failures = 0, starts = 0;

  sort_slave dut (.clk, .rst_n, .avs_address(a), .avs_read(rd), .avs_write(wr), .avs_writedata(wd),
    .avs_readdata(rdata), .avs_readdatavalid(rv), .lock_i(lock), .start_o(start), .data_o(ops),
    .done_i(sdone), .sorted_i(srt));
  // the sorter is shared: while locked it sorts the sequencer's cells
  prc_sorter u_sort (.clk, .rst_n, .start_i(lock ? lstart : start), .data_i(sin),
    .done_o(sdone), .sorted_o(srt));

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (100000) @(posedge clk);
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
    int d, st;
    a = 0; wd = 0;
    foreach (lockdata[i]) lockdata[i] = 16'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    br(16, st);
    checks++;
    if (st != 0) begin failures++; $display("status after reset %0d", st); end
    // locked from reset: the start is ignored and the sequencer's sort
    // must not raise done
    @(negedge clk) lock = 1;
    bw(16, 1);
    @(negedge clk) lstart = 1;
    @(negedge clk) lstart = 0;
    br(16, st);
    checks++;
    if (st != 2) begin failures++; $display("locked status after reset %0d", st); end
    @(negedge clk) lock = 0;
    for (int t = 0; t < 150; t++) begin
      for (int i = 0; i < N; i++) begin
        v[i] = (t % 2) ? int'($urandom_range(0, 5)) : int'($urandom_range(0, 65535));
        bw(i, v[i] | 32'h5a5a_0000);
      end
      s = ref_sort(v);
      bw(16, 1);
      br(16, st);
      checks++;
      if (st != 1) begin failures++; $display("status %0d after sort", st); end
      for (int i = 0; i < N; i++) begin
        br(i, d);
        checks++;
        if (d != s[i]) begin failures++; $display("t=%0d slot %0d: %0d != %0d", t, i, d, s[i]); end
      end
      if (t % 10 == 0) begin
        // locked: start ignored, sequencer's sort does not raise done
        bw(16, 1);
        @(negedge clk) lock = 1;
        bw(16, 1);
        @(negedge clk) lstart = 1;
        @(negedge clk) lstart = 0;
        br(16, st);
        checks++;
        if (st != 3) begin failures++; $display("locked status %0d", st); end   // done kept
        @(negedge clk) lock = 0;
      end
    end
    checks++;
    if (starts != 150 + 15) begin failures++; $display("starts %0d", starts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
