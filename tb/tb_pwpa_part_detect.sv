// Testbench for pwpa_part_detect: random sorted breakpoint sets and random
// inputs (including inputs equal to a breakpoint); the expected id is the
// number of breakpoints not above x, found by a linear scan in real.
module tb_pwpa_part_detect;
  import fp16_ref_pkg::*;
  logic [15:0] x;
  logic [6:0][15:0] bp;
  logic [2:0] id;
  int checks = 0, failures = 0;

  pwpa_part_detect dut (.x_i(x), .bp_i(bp), .id_o(id));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int set = 0; set < 200; set++) begin
      real v [7];
      real t;
      for (int i = 0; i < 7; i++) v[i] = fp16_to_real(rand_fp16(10, 20));
      // insertion sort, distinct values assumed (ties are harmless)
      for (int i = 1; i < 7; i++)
        for (int k = i; k > 0 && v[k] < v[k-1]; k--) begin t = v[k]; v[k] = v[k-1]; v[k-1] = t; end
      for (int i = 0; i < 7; i++) bp[i] = real_to_fp16(v[i]);
      for (int n = 0; n < 100; n++) begin
        int e;
        x = (n % 10 == 0) ? bp[$urandom % 7] : rand_fp16(8, 22);
        if (n == 1) x = 16'h8000;
        #1;
        e = 0;
        for (int i = 0; i < 7; i++) if (fp16_to_real(x) >= fp16_to_real(bp[i])) e = i + 1;
        checks++;
        if (int'(id) != e) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h id=%0d exp=%0d", x, id, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
