// Testbench for pwpa_post_process: p * 2^adj for random p in (0.25, 2) and
// adj in [-15, 14], compared with exact scaling in real (results that leave
// the normal range are checked for saturation and flush).
module tb_pwpa_post_process;
  import fp16_ref_pkg::*;
  logic [15:0] p, y;
  logic [4:0] adj;
  int checks = 0, failures = 0;

  pwpa_post_process dut (.p_i(p), .exp_adj_i(adj), .y_o(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      real v;
      logic [15:0] e;
      int a;
      p = rand_fp16(13, 15);
      p[15] = 1'b0;
      a = int'($urandom % 30) - 15;
      adj = 5'(a);
      #1;
      v = fp16_to_real(p) * (2.0 ** a);
      if (v >= 65536.0)            e = 16'h7C00;
      else if (v < 2.0 ** (-14))   e = 16'h0000;
      else                         e = real_to_fp16(v);
      checks++;
      if (y !== e) begin failures++; if (failures < 10) $display("FAIL p=%h adj=%0d y=%h exp=%h", p, a, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
