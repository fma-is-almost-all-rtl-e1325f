// Testbench for nl_fifo: random push/pop traffic against a queue model;
// checks data order, the fill count, and ready/valid at full and empty.
module tb_nl_fifo;
  localparam int W = 32, D = 8;
  logic clk = 0, rst_n = 0;
  logic iv, ir, ov, ordy;
  logic [W-1:0] id, od;
  logic [3:0] cnt;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, fulls = 0;

  nl_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk_i(clk), .rst_ni(rst_n), .in_valid_i(iv), .in_ready_o(ir),
    .in_data_i(id), .out_valid_o(ov), .out_ready_i(ordy), .out_data_o(od), .count_o(cnt));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; ordy = 0; id = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      iv   = ($urandom % 100) < ((n / 500) % 2 ? 30 : 70);
      ordy = ($urandom % 100) < ((n / 500) % 2 ? 70 : 30);
      id   = $urandom;
      #1;
      checks++;
      if (int'(cnt) != model.size() || ir != (model.size() < D) || ov != (model.size() > 0)) begin
        failures++; if (failures < 10) $display("FAIL status cnt=%0d model=%0d", cnt, model.size());
      end
      if (model.size() == D) fulls++;
      if (ov && ordy) begin
        checks++;
        if (od !== model[0]) begin failures++; if (failures < 10) $display("FAIL data"); end
      end
      @(posedge clk);
      if (ov && ordy) void'(model.pop_front());
      if (iv && ir) model.push_back(id);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
