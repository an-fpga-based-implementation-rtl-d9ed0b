// tb_onchip_ram: writes and reads random words of a 128K x 32 and a
// 64K x 16 instance over their Avalon-MM ports, checking data and the
// one-clock readdatavalid.
module tb_onchip_ram;
  logic clk = 0, rst_n = 0;
  logic [16:0] ia; logic ir = 0, iw = 0; logic [31:0] iwd, ird; logic iv;
  logic [15:0] da; logic dr = 0, dw = 0; logic [15:0] dwd, drd; logic dv;
  int checks = 0, failures = 0;
  int imodel [int];
  int dmodel [int];

  onchip_ram #(.DW(32), .DEPTH(131072)) u_i (.clk, .rst_n, .avs_address(ia), .avs_read(ir),
    .avs_write(iw), .avs_writedata(iwd), .avs_readdata(ird), .avs_readdatavalid(iv));
  onchip_ram #(.DW(16), .DEPTH(65536)) u_d (.clk, .rst_n, .avs_address(da), .avs_read(dr),
    .avs_write(dw), .avs_writedata(dwd), .avs_readdata(drd), .avs_readdatavalid(dv));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int keys [$];
    ia = 0; da = 0; iwd = 0; dwd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      checks++;                       // no readdatavalid after a write
      if (iv || dv) begin failures++; $display("readdatavalid after write"); end
      iw = 1; dw = 1;
      ia = 17'($urandom); iwd = $urandom; imodel[int'(ia)] = int'(iwd);
      da = 16'(ia);       dwd = 16'($urandom); dmodel[int'(da)] = int'(dwd);
      keys.push_back(int'(ia));
    end
    @(negedge clk) iw = 0; dw = 0;
    foreach (keys[n]) begin
      @(negedge clk) ir = 1; dr = 1; ia = 17'(keys[n]); da = 16'(keys[n]);
      @(negedge clk) ir = 0; dr = 0;
      checks += 4;
      if (!iv || !dv) begin failures++; $display("readdatavalid missing"); end
      if (int'(ird) != imodel[keys[n]]) begin failures++; $display("imem %0h", keys[n]); end
      if (int'(drd) != dmodel[keys[n] % 65536]) begin failures++; $display("dmem %0h", keys[n]); end
      @(negedge clk);
      checks++;
      if (iv || dv) begin failures++; $display("readdatavalid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
