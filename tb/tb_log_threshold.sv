// tb_log_threshold: random logs and coefficients (both orders of the two
// logs, the published alpha and beta values and random ones) against
// l1 + floor((lx - l1) * c / 4096) worked out in real arithmetic.
module tb_log_threshold;
  import tb_ref_pkg::*;
  logic [11:0] l1, lx;
  logic [15:0] c;
  logic signed [15:0] t;
  int checks = 0, failures = 0;

  log_threshold dut (.l1_i(l1), .lx_i(lx), .coef_i(c), .thr_o(t));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      automatic int a = int'($urandom_range(0, 2815));
      automatic int b = int'($urandom_range(0, 2815));
      automatic int cc;
      case (n % 3)
        0: cc = alpha_q(n % 4);
        1: cc = beta_q(n % 5);
        default: cc = int'($urandom_range(0, 16383));
      endcase
      if (n % 4 != 0 && b < a) begin automatic int tmp = a; a = b; b = tmp; end
      l1 = 12'(a); lx = 12'(b); c = 16'(cc);
      #1;
      checks++;
      if (int'(t) != ref_thr(a, b, cc)) begin
        failures++;
        if (failures < 10) $display("l1=%0d lx=%0d c=%0d: %0d != %0d", a, b, cc, t, ref_thr(a, b, cc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
