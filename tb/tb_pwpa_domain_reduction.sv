// Testbench for pwpa_domain_reduction: for random positive normal x the
// reduced operand must lie in [1,2) (reciprocal) or [1,4) (inverse square
// root) and rescale exactly back to x with the returned exponent.
module tb_pwpa_domain_reduction;
  import fp16_ref_pkg::*;
  logic [15:0] x, m;
  logic isqrt;
  logic [4:0] adj;
  int checks = 0, failures = 0;

  pwpa_domain_reduction dut (.x_i(x), .isqrt_i(isqrt), .m_o(m), .exp_adj_o(adj));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      real xm, mm;
      int a;
      x = rand_fp16(1, 30);
      x[15] = 1'b0;
      isqrt = n[0];
      #1;
      xm = fp16_to_real(x);
      mm = fp16_to_real(m);
      a  = int'($signed(adj));
      checks++;
      if (!isqrt) begin
        if (!(mm >= 1.0 && mm < 2.0 && mm * (2.0 ** (-a)) == xm)) begin
          failures++; if (failures < 10) $display("FAIL recip x=%h m=%h adj=%0d", x, m, a);
        end
      end else begin
        if (!(mm >= 1.0 && mm < 4.0 && mm * (2.0 ** (-2 * a)) == xm)) begin
          failures++; if (failures < 10) $display("FAIL isqrt x=%h m=%h adj=%0d", x, m, a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
