// RedMule computing element (CE): one FP16 FMA res = a * b + c followed by
// PIPE register stages, so a new operation can be issued every cycle and its
// result appears PIPE cycles later (pipeline depth P = 2 in the engine
// configuration used throughout). A valid bit travels with each operation.
// How the PIPE stages are placed inside the FMA is not fixed by the engine
// description; here the FMA is combinational and the registers follow it,
// leaving retiming to synthesis.
module redmule_ce
  import nl_pkg::*;
#(
  parameter int unsigned PIPE = 2
) (
  input  logic  clk_i,
  input  logic  rst_ni,
  input  logic  valid_i,
  input  fp16_t a_i,
  input  fp16_t b_i,
  input  fp16_t c_i,
  output logic  valid_o,
  output fp16_t res_o
);

  fp16_t fma_res;
  fp16_t res_q [PIPE];
  logic  vld_q [PIPE];

  fp16_fma u_fma (.a_i(a_i), .b_i(b_i), .c_i(c_i), .res_o(fma_res));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < PIPE; i++) begin
        res_q[i] <= '0;
        vld_q[i] <= 1'b0;
      end
    end else begin
      res_q[0] <= fma_res;
      vld_q[0] <= valid_i;
      for (int i = 1; i < PIPE; i++) begin
        res_q[i] <= res_q[i-1];
        vld_q[i] <= vld_q[i-1];
      end
    end
  end

  assign res_o   = res_q[PIPE-1];
  assign valid_o = vld_q[PIPE-1];

endmodule
