// Testbench for x_buffer: random row writes, full contents compared with a
// shadow copy after every write.
module tb_x_buffer;
  localparam int L = 8, H = 8;
  logic clk = 0, rst_n = 0, we;
  logic [2:0] row;
  logic [H-1:0][15:0] wd;
  logic [L-1:0][H-1:0][15:0] x;
  logic [15:0] shadow [L][H];
  int checks = 0, failures = 0;

  x_buffer #(.L(L), .H(H)) dut (.clk_i(clk), .rst_ni(rst_n), .we_i(we), .wrow_i(row), .wdata_i(wd), .x_o(x));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; row = 0; wd = '0;
    for (int r = 0; r < L; r++) for (int c = 0; c < H; c++) shadow[r][c] = 16'h0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = ($urandom % 3 != 0); row = 3'($urandom); 
      for (int c = 0; c < H; c++) wd[c] = 16'($urandom);
      if (we) for (int c = 0; c < H; c++) shadow[row][c] = wd[c];
      @(negedge clk);
      we = 0;
      for (int r = 0; r < L; r++) for (int c = 0; c < H; c++) begin
        checks++;
        if (x[r][c] !== shadow[r][c]) begin failures++; if (failures < 10) $display("FAIL %0d %0d", r, c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
