// tb_bacosd_top: end-to-end test of the B-ACOSD detector at its full size
// (256 cells, N = 16, p = 12, two guard cells), driven only through the
// Avalon-MM slave ports as a host processor would.
//
// Four runs of 256 samples: even runs draw the clutter from a log-normal
// distribution, odd runs from an exponential one (mean 60 code steps).
// Each run writes 256 samples, starts the detector, polls the status word,
// then reads every result bit, the target count and the cycle count, and
// compares them with the reference model (tb_ref_pkg). The log-normal
// clutter has mu = 1, sigma = 1.1 with one code step = 0.061; both kinds get
// point targets and clusters of 1..6 strong returns injected, and a stretch
// of homogeneous clutter holding a cluster of four returns and a target, so
// that every number of censored interferers 0..4 occurs. The expected run
// length is 2 clocks per edge sample, 11 + k per full cell, plus 10.
// After each run some of its cells (all cells of the homogeneous stretch in
// later runs) are processed again the way software would, through the
// per-cell ports: reference cells into the sorting logic, sorted cells and
// X0 into the censoring/detection logic; sorted order, k, decision and
// threshold are checked. The log look-up memory port is read and checked.
// Also counted and required: detections and non-detections, edge cells,
// samples beyond the log table, tied values in a window, a start while
// busy (ignored), per-cell ports locked during a run, per-cell cells with
// k = 0 and k = N-p, and instruction / data memory accesses.
module tb_bacosd_top;
  import tb_ref_pkg::*;
  localparam int NC = 256, CUT = 9;

  logic clk = 0, rst_n = 0;
  logic [9:0]  addr; logic rd = 0, wr = 0; logic [31:0] wdata, rdata; logic rvalid;
  logic [16:0] ia; logic ir = 0, iw = 0; logic [31:0] iwd, ird; logic iv;
  logic [15:0] da; logic dr = 0, dw = 0; logic [15:0] dwd, drd; logic dv;
  logic [4:0]  c1a, c2a; logic c1r = 0, c1w = 0, c2r = 0, c2w = 0;
  logic [31:0] c1wd, c1rd, c2wd, c2rd; logic c1v, c2v;
  logic [15:0] la; logic lr = 0; logic [31:0] lrd; logic lv;
  logic run_done;
  int checks = 0, failures = 0;

  bacosd_top dut (
    .clk, .rst_n,
    .avs_address(addr), .avs_read(rd), .avs_write(wr), .avs_writedata(wdata),
    .avs_readdata(rdata), .avs_readdatavalid(rvalid),
    .cl1_address(c1a), .cl1_read(c1r), .cl1_write(c1w), .cl1_writedata(c1wd),
    .cl1_readdata(c1rd), .cl1_readdatavalid(c1v),
    .cl2_address(c2a), .cl2_read(c2r), .cl2_write(c2w), .cl2_writedata(c2wd),
    .cl2_readdata(c2rd), .cl2_readdatavalid(c2v),
    .lut_address(la), .lut_read(lr), .lut_readdata(lrd), .lut_readdatavalid(lv),
    .imem_address(ia), .imem_read(ir), .imem_write(iw), .imem_writedata(iwd),
    .imem_readdata(ird), .imem_readdatavalid(iv),
    .dmem_address(da), .dmem_read(dr), .dmem_write(dw), .dmem_writedata(dwd),
    .dmem_readdata(drd), .dmem_readdatavalid(dv),
    .run_done_o(run_done));

  always #2 clk = ~clk;   // 250 MHz

  // mechanism counters
  int seen_k [N-P+1];
  int n_target, n_clear, n_edge, n_sat, n_tie, n_busy_start, n_mem, n_done_pulse;
  int n_sw_cell, n_sw_lock, n_lut;
  int sw_k [N-P+1];

  always @(posedge clk) if (run_done) n_done_pulse++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(int a, int d);
    @(negedge clk) addr = 10'(a); wdata = d; wr = 1;
    @(negedge clk) wr = 0;
  endtask

  task automatic bus_read(int a, output int d);
    @(negedge clk) addr = 10'(a); rd = 1;
    @(negedge clk) rd = 0;
    if (!rvalid) begin failures++; $display("readdatavalid missing"); end
    d = int'(rdata);
  endtask

  function automatic int lognormal_code();
    real u1 = (real'($urandom_range(0, 999999)) + 1.0) / 1000001.0;
    real u2 = real'($urandom_range(0, 999999)) / 1000000.0;
    real g  = $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
    real a  = $exp(1.0 + 1.1 * g);
    int  c  = $rtoi(a / 0.061);
    return (c > 65535) ? 65535 : c;
  endfunction

  // exponential clutter with a mean of 60 code steps
  function automatic int exponential_code();
    real u = (real'($urandom_range(0, 999999)) + 1.0) / 1000001.0;
    int  c = $rtoi(-60.0 * $ln(u));
    return (c > 65535) ? 65535 : c;
  endfunction

  // per-cell slave ports: 0 = sorting logic, 1 = censoring/detection logic
  task automatic cl_write(int port, int a, int d);
    @(negedge clk);
    if (port == 0) begin c1a = 5'(a); c1wd = d; c1w = 1; end
    else           begin c2a = 5'(a); c2wd = d; c2w = 1; end
    @(negedge clk) c1w = 0; c2w = 0;
  endtask

  task automatic cl_read(int port, int a, output int d);
    @(negedge clk);
    if (port == 0) begin c1a = 5'(a); c1r = 1; end
    else           begin c2a = 5'(a); c2r = 1; end
    @(negedge clk) c1r = 0; c2r = 0;
    if (port == 0 ? !c1v : !c2v) begin failures++; $display("cl readdatavalid missing"); end
    d = (port == 0) ? int'(c1rd) : int'(c2rd);
  endtask

  // one cell the way software does it: sort on the first custom logic,
  // move the sorted cells to the second, censor and detect there
  task automatic sw_cell(vec_t r, int x0);
    vec_t s = ref_sort(r);
    int k_ref, st, d, n;
    bit t_ref = ref_target(r, x0, k_ref);
    for (int i = 0; i < N; i++) cl_write(0, i, r[i]);
    cl_write(0, 16, 1);
    n = 0;
    do begin cl_read(0, 16, st); n++; end while ((st & 1) == 0 && n < 50);
    for (int i = 0; i < N; i++) begin
      cl_read(0, i, d);
      checks++;
      if (d != s[i]) begin failures++; $display("sorter port slot %0d: %0d != %0d", i, d, s[i]); end
      cl_write(1, i, d);
    end
    cl_write(1, 16, x0);
    cl_write(1, 17, 1);
    n = 0;
    do begin cl_read(1, 0, st); n++; end while ((st & 1) == 0 && n < 50);
    cl_read(1, 1, d);
    checks++;
    if (d != k_ref) begin failures++; $display("censor port k %0d != %0d", d, k_ref); end
    cl_read(1, 2, d);
    checks++;
    if (d != int'(t_ref)) begin failures++; $display("censor port decision %0d != %0d", d, t_ref); end
    cl_read(1, 3, d);
    checks++;
    if (d != ref_thr(ref_log(s[0]), ref_log(s[N-1-k_ref]), beta_q(k_ref))) begin
      failures++; $display("censor port threshold %0d", d);
    end
    n_sw_cell++;
    sw_k[k_ref]++;
  endtask

  task automatic one_run(int run);
    int x [NC];
    bit exp_t [NC];
    int exp_cycles, exp_count, d, st;
    // data
    for (int i = 0; i < NC; i++) x[i] = (run % 2 == 0) ? lognormal_code() : exponential_code();
    for (int n = 0; n < 14; n++) begin            // clusters of strong returns
      int pos = int'($urandom_range(0, NC - 8));
      int len = int'($urandom_range(1, 6));
      for (int j = 0; j < len; j++) x[pos + j] = int'($urandom_range(1500, 9000));
    end
    for (int n = 0; n < 10; n++)                  // isolated point targets
      x[$urandom_range(0, NC - 1)] = int'($urandom_range(400, 3000));
    x[40] = x[45];                                // a guaranteed tie
    // a stretch of homogeneous clutter with a cluster of four interferers
    // and a target near it: narrow clutter spread lets all four be censored
    for (int i = 100; i < 170; i++) x[i] = int'($urandom_range(30, 60));
    for (int i = 120; i < 124; i++) x[i] = int'($urandom_range(1500, 1990));
    x[150] = int'($urandom_range(600, 1990));
    x[155] = int'($urandom_range(1500, 1990));
    x[156] = int'($urandom_range(1500, 1990));
    // reference
    exp_cycles = 2 * (2 * CUT) + CUT + 1;
    exp_count = 0;
    for (int c = 0; c < NC; c++) begin
      if (c < CUT || c >= NC - CUT) begin
        exp_t[c] = 0;
        n_edge++;
      end else begin
        vec_t r;
        int k;
        for (int j = 0; j < 8; j++) begin
          r[j]     = x[c + 2 + j];
          r[8 + j] = x[c - 9 + j];
        end
        exp_t[c] = ref_target(r, x[c], k);
        seen_k[k]++;
        exp_count += int'(exp_t[c]);
        if (exp_t[c]) n_target++; else n_clear++;
        exp_cycles += 11 + k;
        for (int a = 0; a < 16; a++) begin
          if (r[a] >= DEPTH) n_sat++;
          for (int b = a + 1; b < 16; b++) if (r[a] == r[b]) n_tie++;
        end
      end
    end
    // load, run, poll
    for (int i = 0; i < NC; i++) bus_write(i, x[i]);
    for (int i = 0; i < NC; i += 37) begin
      bus_read(i, d);
      checks++;
      if (d != x[i]) begin failures++; $display("sample %0d read back %0d", i, d); end
    end
    bus_write(32'h200, 1);
    bus_read(32'h200, st);
    checks++;
    if ((st & 1) == 0) begin failures++; $display("not busy after start"); end
    bus_write(32'h200, 1);                        // start while busy: ignored
    n_busy_start++;
    cl_read(0, 16, d);                            // per-cell ports locked
    checks++;
    if ((d & 2) == 0) begin failures++; $display("sorter port not locked during a run"); end
    else n_sw_lock++;
    do bus_read(32'h200, st); while ((st & 2) == 0);
    checks++;
    if (st != 2) begin failures++; $display("status %0h after run", st); end
    // results
    for (int c = 0; c < NC; c++) begin
      bus_read(32'h100 + c, d);
      checks++;
      if (d != int'(exp_t[c])) begin
        failures++;
        if (failures < 20) $display("run %0d cell %0d: decision %0d expected %0d", run, c, d, exp_t[c]);
      end
    end
    // the same cells again, some of them, through the per-cell ports
    for (int c = CUT; c < NC - CUT; c += (run < 2) ? 23 : 1) begin
      vec_t r;
      int k;
      for (int j = 0; j < 8; j++) begin
        r[j]     = x[c + 2 + j];
        r[8 + j] = x[c - 9 + j];
      end
      if (run < 2 || (c >= 110 && c < 130)) sw_cell(r, x[c]);
    end
    bus_read(32'h201, d);
    checks++;
    if (d != exp_count) begin failures++; $display("target count %0d expected %0d", d, exp_count); end
    bus_read(32'h202, d);
    checks++;
    if (d != exp_cycles) begin failures++; $display("run cycles %0d expected %0d", d, exp_cycles); end
    checks++;                                     // real-time budget: 0.45 us = 112 clocks per cell
    if (d > 112 * (NC - 2 * CUT)) begin failures++; $display("over the per-cell time budget"); end
    $display("run %0d: %0d targets, %0d cycles, %0.1f cycles (%0.1f ns at 250 MHz) per full cell",
             run, exp_count, d, real'(d) / (NC - 2 * CUT), 4.0 * real'(d) / (NC - 2 * CUT));
  endtask

  initial begin
    addr = 0; wdata = 0; ia = 0; iwd = 0; da = 0; dwd = 0;
    foreach (seen_k[i]) seen_k[i] = 0;
    {n_target, n_clear, n_edge, n_sat, n_tie, n_busy_start, n_mem, n_done_pulse} = '0;
    {n_sw_cell, n_sw_lock, n_lut} = '0;
    foreach (sw_k[i]) sw_k[i] = 0;
    c1a = 0; c2a = 0; c1wd = 0; c2wd = 0; la = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) one_run(run);
    // processor memories behind their own slave ports
    for (int n = 0; n < 8; n++) begin
      automatic int a = int'($urandom_range(0, 65535));
      automatic int v = int'($urandom);
      @(negedge clk) ia = 17'(a * 2); iwd = v; iw = 1; da = 16'(a); dwd = 16'(v); dw = 1;
      @(negedge clk) iw = 0; dw = 0; ir = 1; dr = 1;
      @(negedge clk) ir = 0; dr = 0;
      checks++;
      if (!iv || !dv || ird != 32'(v) || drd != 16'(v)) begin failures++; $display("memory port %0d", n); end
      n_mem++;
    end
    // log look-up memory port
    for (int n = 0; n < 200; n++) begin
      automatic int a = (n < 100) ? int'($urandom_range(0, 2100)) : int'($urandom_range(0, 65535));
      @(negedge clk) la = 16'(a); lr = 1;
      @(negedge clk) lr = 0;
      checks++;
      if (!lv || int'(lrd) != ref_log(a)) begin failures++; $display("lut port %0d: %0d", a, lrd); end
      n_lut++;
    end
    // every mechanism must have occurred
    for (int i = 0; i <= N - P; i++) begin
      $display("cells with k = %0d: %0d", i, seen_k[i]);
      checks++;
      if (seen_k[i] == 0) begin failures++; $display("k = %0d never occurred", i); end
    end
    $display("targets %0d, clear %0d, edge %0d, saturated refs %0d, ties %0d, busy starts %0d, mem %0d, done pulses %0d",
             n_target, n_clear, n_edge, n_sat, n_tie, n_busy_start, n_mem, n_done_pulse);
    for (int i = 0; i <= N - P; i++) $display("per-cell port cells with k = %0d: %0d", i, sw_k[i]);
    $display("per-cell port cells %0d, locked reads %0d, lut reads %0d", n_sw_cell, n_sw_lock, n_lut);
    checks += 4;
    if (n_sw_cell == 0) failures++;
    if (sw_k[N-P] == 0 || sw_k[0] == 0) begin failures++; $display("per-cell path missed k = 0 or k = N-p"); end
    if (n_sw_lock == 0) failures++;
    if (n_lut == 0) failures++;
    checks += 8;
    if (n_target == 0)     begin failures++; $display("no target detected"); end
    if (n_clear == 0)      begin failures++; $display("no clear cell"); end
    if (n_edge == 0)       failures++;
    if (n_sat == 0)        begin failures++; $display("log table never saturated"); end
    if (n_tie == 0)        begin failures++; $display("no tie"); end
    if (n_busy_start == 0) failures++;
    if (n_mem == 0)        failures++;
    if (n_done_pulse != 4) begin failures++; $display("done pulses %0d", n_done_pulse); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
