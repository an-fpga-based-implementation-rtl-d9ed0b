// tb_ref_window: shifts random samples through the reference window and
// checks, after every shift, the N reference cells and the cell under test
// against a model of the line (leading cells 0..7, guard 8, CUT 9, guard 10,
// lagging cells 11..18), including the first shifts after reset.
module tb_ref_window;
  localparam int NREF = 16, NG = 2, LEN = NREF + NG + 1;
  logic clk = 0, rst_n = 0, shift = 0;
  logic [15:0] din;
  logic [15:0] refo [NREF];
  logic [15:0] cut;
  int checks = 0, failures = 0;
  int line [LEN];

  ref_window dut (.clk, .rst_n, .shift_i(shift), .sample_i(din), .ref_o(refo), .cut_o(cut));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (line[i]) line[i] = 0;
    din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      din = 16'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int i = LEN - 1; i > 0; i--) line[i] = line[i-1];
        line[0] = din;
      end
      #1;
      for (int i = 0; i < NREF / 2; i++) begin
        checks += 2;
        if (refo[i] != 16'(line[i])) begin failures++; $display("lead %0d: %0d != %0d", i, refo[i], line[i]); end
        if (refo[NREF/2 + i] != 16'(line[NREF/2 + NG + 1 + i])) begin
          failures++; $display("lag %0d: %0d != %0d", i, refo[NREF/2+i], line[NREF/2+NG+1+i]);
        end
      end
      checks++;
      if (cut != 16'(line[NREF/2 + NG/2])) begin failures++; $display("cut %0d != %0d", cut, line[9]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
