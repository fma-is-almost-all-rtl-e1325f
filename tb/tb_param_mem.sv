// Testbench for param_mem: writes random words to every address, then
// checks that breakpoints, coefficients and per-row shift values appear on
// the right broadcast outputs; an out-of-range write must change nothing.
module tb_param_mem;
  localparam int L = 8, P = 2, NW = 39 + L * P;
  logic clk = 0, rst_n = 0, we;
  logic [5:0] addr;
  logic [15:0] wd;
  logic [6:0][15:0] bp;
  logic [3:0][7:0][15:0] coef;
  logic [L-1:0][P-1:0][15:0] shift;
  logic [15:0] img [NW];
  int checks = 0, failures = 0;

  param_mem #(.L(L), .P(P)) dut (.clk_i(clk), .rst_ni(rst_n), .we_i(we), .waddr_i(addr), .wdata_i(wd),
                                 .bp_o(bp), .coef_o(coef), .shift_o(shift));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < 7; i++) begin
      checks++; if (bp[i] !== img[i]) begin failures++; $display("FAIL bp %0d", i); end
    end
    for (int p = 0; p < 8; p++) for (int s = 0; s < 4; s++) begin
      checks++; if (coef[s][p] !== img[7 + 4 * p + s]) begin failures++; $display("FAIL coef %0d %0d", p, s); end
    end
    for (int r = 0; r < L; r++) for (int s = 0; s < P; s++) begin
      checks++; if (shift[r][s] !== img[39 + P * r + s]) begin failures++; $display("FAIL shift %0d %0d", r, s); end
    end
  endtask

  initial begin
    we = 0; addr = 0; wd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 5; round++) begin
      for (int i = 0; i < NW; i++) begin
        @(negedge clk);
        we = 1; addr = 6'(i); wd = 16'($urandom); img[i] = wd;
      end
      @(negedge clk);
      we = 1; addr = 6'(NW); wd = 16'hDEAD;     // out of range
      @(negedge clk);
      we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
