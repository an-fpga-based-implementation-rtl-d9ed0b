// tb_log_lut: reads every entry of the log ROM, and addresses beyond the
// table, and compares each with floor(log2(x) * 256) from real arithmetic
// (x clamped to 1 .. 1999), on both read ports at once. Checks the
// one-clock read latency.
module tb_log_lut;
  import tb_ref_pkg::*;
  logic clk = 0;
  logic [15:0] addr;
  logic [11:0] q, qb;
  logic [15:0] addr_b;
  int checks = 0, failures = 0;

  log_lut dut (.clk, .addr_i(addr), .data_o(q), .addr_b_i(addr_b), .data_b_o(qb));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // port A reads x, port B at the same time reads another address
  task automatic check_addr(int x);
    automatic int y = (x * 7 + 13) % 2100;
    @(negedge clk) addr = 16'(x); addr_b = 16'(y);
    @(posedge clk) #1;
    checks += 2;
    if (int'(q) != ref_log(x)) begin
      failures++;
      if (failures < 10) $display("x=%0d q=%0d expected %0d", x, q, ref_log(x));
    end
    if (int'(qb) != ref_log(y)) begin
      failures++;
      if (failures < 10) $display("port B y=%0d q=%0d expected %0d", y, qb, ref_log(y));
    end
  endtask

  initial begin
    addr = 0; addr_b = 0;
    for (int x = 0; x < 2100; x++) check_addr(x);
    check_addr(16'hffff);
    check_addr(40000);
    // latency: a new address must not change the output before the edge
    @(negedge clk) addr = 16'd1024;
    @(posedge clk) #1;
    @(negedge clk) addr = 16'd3;
    #1 checks++;
    if (int'(q) != 10 * 256) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
