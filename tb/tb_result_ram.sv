// tb_result_ram: writes random decision bits to random cells of the
// 1 x 256 result memory while reading others, and compares every read
// with a model; checks read-old-value on a same-clock write and read.
module tb_result_ram;
  logic clk = 0, we = 0, wd, rd;
  logic [7:0] wa, ra;
  int checks = 0, failures = 0;
  bit model [256];

  result_ram dut (.clk, .we_i(we), .waddr_i(wa), .wdata_i(wd), .raddr_i(ra), .rdata_o(rd));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    wa = 0; ra = 0; wd = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) we = 1; wa = 8'(i); wd = 1'($urandom); model[i] = wd;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 8'($urandom); wd = 1'($urandom);
      ra = (n % 4 == 0) ? wa : 8'($urandom);
      exp = model[ra];
      @(posedge clk) #1;
      if (we) model[wa] = wd;
      checks++;
      if (rd != exp) begin failures++; $display("n=%0d read %0d: %0b != %0b", n, ra, rd, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
