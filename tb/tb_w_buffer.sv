// Testbench for w_buffer: a new random W vector every cycle; column j of the
// output must equal column j of the vector applied j*P cycles earlier.
module tb_w_buffer;
  localparam int H = 8, P = 2;
  logic clk = 0, rst_n = 0;
  logic [H-1:0][15:0] wi, wo;
  logic [H-1:0][15:0] hist [$];
  int checks = 0, failures = 0;

  w_buffer #(.H(H), .P(P)) dut (.clk_i(clk), .rst_ni(rst_n), .w_i(wi), .w_o(wo));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wi = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int j = 0; j < H; j++) wi[j] = 16'($urandom);
      hist.push_front(wi);
      #1;
      for (int j = 0; j < H; j++) if (hist.size() > j * P) begin
        checks++;
        if (wo[j] !== hist[j * P][j]) begin failures++; if (failures < 10) $display("FAIL col %0d", j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
