// tb_cfar_avalon_slave: exercises the register map of the detector's
// Avalon-MM slave against models of the sample and result memories and of
// the sequencer status: sample writes and read-back, result reads, start
// (accepted only when idle), busy/done status with done sticky until the
// next start, target count and cycle count, read latency 1.
module tb_cfar_avalon_slave;
  logic clk = 0, rst_n = 0;
  logic [9:0] addr; logic rd = 0, wr = 0; logic [31:0] wdata, rdata; logic rvalid;
  logic swe; logic [7:0] saddr, raddr; logic [15:0] swd, srd; logic rrd;
  logic start, busy = 0, done = 0;
  logic [15:0] cnt; logic [31:0] cyc;
  int checks = 0, failures = 0, starts = 0;
  logic [15:0] smem [256];
  logic rmem [256];

  cfar_avalon_slave dut (.clk, .rst_n, .avs_address(addr), .avs_read(rd), .avs_write(wr),
    .avs_writedata(wdata), .avs_readdata(rdata), .avs_readdatavalid(rvalid),
    .smem_we_o(swe), .smem_addr_o(saddr), .smem_wdata_o(swd), .smem_rdata_i(srd),
    .res_addr_o(raddr), .res_rdata_i(rrd), .start_o(start), .busy_i(busy), .done_i(done),
    .det_count_i(cnt), .cycles_i(cyc));

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (swe) smem[saddr] <= swd;
    srd <= smem[saddr];
    rrd <= rmem[raddr];
  end
  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int a, int d);
    @(negedge clk) addr = 10'(a); wdata = d; wr = 1;
    @(negedge clk) wr = 0;
  endtask

  task automatic read(int a, output int d);
    @(negedge clk) addr = 10'(a); rd = 1;
    @(negedge clk) rd = 0;
    checks++;
    if (!rvalid) begin failures++; $display("readdatavalid missing"); end
    d = int'(rdata);
  endtask

  task automatic expect_read(int a, int e);
    int d;
    read(a, d);
    checks++;
    if (d != e) begin failures++; $display("read %0h: %0h != %0h", a, d, e); end
  endtask

  initial begin
    int model [256];
    addr = 0; wdata = 0; cnt = 0; cyc = 0;
    foreach (rmem[i]) rmem[i] = 1'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin model[i] = int'($urandom_range(0, 65535)); write(i, model[i] | 32'hABCD_0000); end
    for (int i = 0; i < 256; i++) expect_read(i, model[i]);
    for (int i = 0; i < 256; i++) expect_read(256 + i, int'(rmem[i]));
    write(256 + 3, 1);                         // read-only: ignored
    expect_read(3, model[3]);
    expect_read(32'h200, 0);
    write(32'h200, 1);
    checks++;
    if (starts != 1) begin failures++; $display("start not issued"); end
    busy = 1;
    write(32'h200, 1);                         // ignored while busy
    checks++;
    if (starts != 1) begin failures++; $display("start accepted while busy"); end
    expect_read(32'h200, 1);
    @(negedge clk) done = 1; busy = 0; cnt = 16'd42; cyc = 32'd3456;
    @(negedge clk) done = 0;
    expect_read(32'h200, 2);
    expect_read(32'h200, 2);                   // sticky
    expect_read(32'h201, 42);
    expect_read(32'h202, 3456);
    write(32'h200, 1);
    expect_read(32'h200, 0);                   // cleared by start
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
