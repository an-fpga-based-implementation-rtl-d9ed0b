// tb_cfar_sequencer: runs the sequencer over 256 cells with a model of the
// cell pipeline that answers cell_start after a random 1..20 clocks with a
// random decision. Checks that the samples are shifted in order, that a
// cell is started exactly when the window is full, that each result word
// is written once with the right value (0 for the edge cells), the target
// count, busy/done, and that a start while busy is ignored. Two runs.
module tb_cfar_sequencer;
  localparam int NC = 256, LEN = 19, CUT = 9;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [7:0] maddr, raddr;
  logic shift, cstart, cdone = 0, tgt = 0, rwe, rdat;
  logic [15:0] cnt;
  int checks = 0, failures = 0;

  cfar_sequencer #(.NC(NC), .LEN(LEN), .CUT(CUT)) dut (
    .clk, .rst_n, .start_i(start), .busy_o(busy), .done_o(done), .mem_addr_o(maddr),
    .shift_o(shift), .cell_start_o(cstart), .cell_done_i(cdone), .target_i(tgt),
    .res_we_o(rwe), .res_addr_o(raddr), .res_data_o(rdat), .det_count_o(cnt));

  always #5 clk = ~clk;

  int shifts, starts, ntgt, writes [NC];
  bit expv [NC], gotv [NC];
  bit pending;

  // model of sorter + censor + detector
  initial begin
    forever begin
      @(posedge clk);
      if (cstart) begin
        automatic int d = int'($urandom_range(1, 20));
        automatic bit t = 1'($urandom);
        if (pending) begin failures++; $display("cell started while one is pending"); end
        pending = 1;
        expv[shifts - 1 - CUT] = t;
        if (t) ntgt++;
        repeat (d - 1) @(posedge clk);
        @(negedge clk) cdone = 1; tgt = t;
        @(negedge clk) cdone = 0; tgt = 1'($urandom);
        pending = 0;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (shift) begin
      checks++;
      if (int'(maddr) != shifts) begin failures++; $display("shift of sample %0d, expected %0d", maddr, shifts); end
      shifts++;
    end
    if (cstart) begin
      starts++;
      checks++;
      if (shifts < LEN) begin failures++; $display("cell started before window full"); end
    end
    if (rwe) begin writes[raddr]++; gotv[raddr] = rdat; end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pending = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      shifts = 0; starts = 0; ntgt = 0;
      foreach (writes[i]) begin writes[i] = 0; expv[i] = 0; end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      checks++;
      if (!busy) begin failures++; $display("not busy after start"); end
      repeat (30) @(negedge clk);
      start = 1;                      // ignored while busy
      @(negedge clk) start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      checks += 4;
      if (busy) begin failures++; $display("busy after done"); end
      if (shifts != NC) begin failures++; $display("shifts %0d", shifts); end
      if (starts != NC - LEN + 1) begin failures++; $display("cells %0d", starts); end
      if (int'(cnt) != ntgt) begin failures++; $display("count %0d != %0d", cnt, ntgt); end
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (writes[i] != 1 || gotv[i] != expv[i]) begin
          failures++;
          $display("cell %0d written %0d times, value %0b expected %0b", i, writes[i], gotv[i], expv[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
