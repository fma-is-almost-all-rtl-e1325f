// Testbench for pwpa_coeff_select: random coefficient sets, every id.
module tb_pwpa_coeff_select;
  logic [7:0][15:0] coef;
  logic [2:0] id;
  logic [15:0] y;
  int checks = 0, failures = 0;

  pwpa_coeff_select dut (.coef_i(coef), .id_i(id), .coef_o(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [15:0] ref_tab [8];
      for (int i = 0; i < 8; i++) begin ref_tab[i] = 16'($urandom); coef[i] = ref_tab[i]; end
      for (int i = 0; i < 8; i++) begin
        id = 3'(i);
        #1;
        checks++;
        if (y !== ref_tab[i]) begin failures++; $display("FAIL id=%0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
