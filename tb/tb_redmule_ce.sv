// Testbench for redmule_ce: a new random FMA every cycle (with random
// bubbles); each result must appear exactly PIPE cycles after issue and
// match the binary64 reference.
module tb_redmule_ce;
  import fp16_ref_pkg::*;
  localparam int PIPE = 2;
  logic clk = 0, rst_n = 0;
  logic vi, vo;
  logic [15:0] a, b, c, r;
  logic [15:0] exp_q [$];
  logic        vld_hist [$];
  int checks = 0, failures = 0;

  redmule_ce #(.PIPE(PIPE)) dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(vi), .a_i(a), .b_i(b), .c_i(c),
                                 .valid_o(vo), .res_o(r));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vi = 0; a = 0; b = 0; c = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000 + PIPE; i++) begin
      @(negedge clk);
      // check the output now visible against what was issued PIPE cycles ago
      if (vld_hist.size() == PIPE) begin
        logic v_exp;
        v_exp = vld_hist.pop_front();
        checks++;
        if (vo !== v_exp) begin failures++; $display("FAIL valid at %0d", i); end
        if (v_exp) begin
          logic [15:0] e;
          e = exp_q.pop_front();
          checks++;
          if (r !== e) begin failures++; if (failures < 10) $display("FAIL got %h exp %h", r, e); end
        end
      end
      vi = (i < 3000) && ($urandom % 4 != 0);
      a = rand_fp16(9, 21); b = rand_fp16(9, 21); c = rand_fp16(9, 21);
      vld_hist.push_back(vi);
      if (vi) exp_q.push_back(fma_r(a, b, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
