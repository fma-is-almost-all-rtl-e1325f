// Self-checking testbench for fp16_fma: directed special cases plus random
// operands checked against a binary64 reference. Random operand ranges keep
// the exact result within 53 bits so the reference rounds only once.
module tb_fp16_fma;
  import fp16_ref_pkg::*;

  logic [15:0] a, b, c, r;
  int checks = 0, failures = 0;

  fp16_fma dut (.a_i(a), .b_i(b), .c_i(c), .res_o(r));

  task automatic check(logic [15:0] exp_r);
    #1;
    checks++;
    if (r !== exp_r) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h c=%h got=%h exp=%h", a, b, c, r, exp_r);
    end
  endtask

  task automatic check_ref();
    real v;
    #1;
    v = fp16_to_real(a) * fp16_to_real(b) + fp16_to_real(c);
    check(real_to_fp16(v));
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed cases
    a = 16'h3C00; b = 16'h3C00; c = 16'h3C00; check(16'h4000);      // 1*1+1 = 2
    a = 16'h4000; b = 16'h4200; c = 16'hBC00; check(16'h4500);      // 2*3-1 = 5
    a = 16'h3C00; b = 16'h3C00; c = 16'hBC00; check(16'h0000);      // exact zero is +0
    a = 16'h8000; b = 16'h3C00; c = 16'h8000; check(16'h8000);      // -0 + -0
    a = 16'h7C00; b = 16'h0000; c = 16'h0000; check(16'h7E00);      // inf*0
    a = 16'h7C00; b = 16'h3C00; c = 16'hFC00; check(16'h7E00);      // inf-inf
    a = 16'h7C00; b = 16'hBC00; c = 16'h3C00; check(16'hFC00);      // -inf
    a = 16'h7BFF; b = 16'h4000; c = 16'h0000; check(16'h7C00);      // overflow
    a = 16'h0001; b = 16'h3C00; c = 16'h0001; check(16'h0002);      // subnormal sum
    a = 16'h0400; b = 16'h3800; c = 16'h0000; check(16'h0200);      // to subnormal
    a = 16'h3C01; b = 16'h3C01; c = 16'hBC02; check(16'h0010);      // cancellation: (1+u)^2-(1+2u) = u^2 = 2^-20
    a = 16'h7E00; b = 16'h3C00; c = 16'h0000; check(16'h7E00);      // NaN in
    // random, exponents bounded so the exact result fits binary64
    for (int i = 0; i < 20000; i++) begin
      a = rand_fp16(9, 21); b = rand_fp16(9, 21); c = rand_fp16(9, 21);
      check_ref();
    end
    // random products over the full range (incl. subnormals/overflow), c = 0
    for (int i = 0; i < 20000; i++) begin
      a = rand_fp16(0, 30); b = rand_fp16(0, 30); c = 16'h0000;
      check_ref();
    end
    // small operands around the subnormal boundary
    for (int i = 0; i < 10000; i++) begin
      a = rand_fp16(0, 12); b = rand_fp16(10, 20); c = rand_fp16(0, 6);
      check_ref();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
