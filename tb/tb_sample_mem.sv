// tb_sample_mem: fills the 256 x 16 sample memory through port A, then
// reads random words through both ports at once (A read-back and B) and
// compares with a model array; checks the one-clock read latency.
module tb_sample_mem;
  logic clk = 0, we = 0;
  logic [7:0] aa, ba;
  logic [15:0] wd, ard, brd;
  int checks = 0, failures = 0;
  int model [256];

  sample_mem dut (.clk, .a_we_i(we), .a_addr_i(aa), .a_wdata_i(wd), .a_rdata_o(ard),
                  .b_addr_i(ba), .b_rdata_o(brd));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aa = 0; ba = 0; wd = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) we = 1; aa = 8'(i); wd = 16'($urandom); model[i] = int'(wd);
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 500; n++) begin
      automatic int x = int'($urandom_range(0, 255));
      automatic int y = int'($urandom_range(0, 255));
      @(negedge clk) aa = 8'(x); ba = 8'(y);
      @(posedge clk) #1;
      checks += 2;
      if (int'(ard) != model[x]) begin failures++; $display("A[%0d] %0h != %0h", x, ard, model[x]); end
      if (int'(brd) != model[y]) begin failures++; $display("B[%0d] %0h != %0h", y, brd, model[y]); end
      if (n % 5 == 0) begin   // overwrite one word
        @(negedge clk) we = 1; aa = 8'(x); wd = 16'($urandom); model[x] = int'(wd);
        @(negedge clk) we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
