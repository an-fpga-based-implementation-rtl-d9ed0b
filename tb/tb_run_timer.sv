// tb_run_timer: counts random run/idle patterns, clears, and checks
// saturation with a narrow counter instance.
module tb_run_timer;
  logic clk = 0, rst_n = 0, clr = 0, run = 0;
  logic [31:0] cnt;
  logic [3:0]  cnt4;
  int checks = 0, failures = 0;
  int model = 0, model4 = 0;

  run_timer dut (.clk, .rst_n, .clear_i(clr), .run_i(run), .count_o(cnt));
  run_timer #(.W(4)) dut4 (.clk, .rst_n, .clear_i(clr), .run_i(run), .count_o(cnt4));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 99) == 0);
      run = ($urandom_range(0, 3) != 0);
      @(posedge clk) #1;
      if (clr) begin model = 0; model4 = 0; end
      else if (run) begin model++; if (model4 < 15) model4++; end
      checks += 2;
      if (int'(cnt) != model) begin failures++; $display("count %0d != %0d", cnt, model); end
      if (int'(cnt4) != model4) begin failures++; $display("count4 %0d != %0d", cnt4, model4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
