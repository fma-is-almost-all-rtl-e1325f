// PWPA coefficient selector for one Horner stage: a three-level multiplexer
// tree, driven by the pipelined partition id, picks the coefficient of the
// current partition from the 8 values ParamMem broadcasts for this stage.
// Combinational.
module pwpa_coeff_select
  import nl_pkg::*;
(
  input  fp16_t [PW_NPART-1:0] coef_i,
  input  logic  [PW_IDW-1:0]   id_i,
  output fp16_t                coef_o
);

  fp16_t lvl1 [4];
  fp16_t lvl2 [2];

  always_comb begin
    for (int i = 0; i < 4; i++) lvl1[i] = id_i[0] ? coef_i[2*i+1] : coef_i[2*i];
    for (int i = 0; i < 2; i++) lvl2[i] = id_i[1] ? lvl1[2*i+1]   : lvl1[2*i];
    coef_o = id_i[2] ? lvl2[1] : lvl2[0];
  end

endmodule
