// PWPA post-processing: recombines the polynomial approximation of the
// reduced operand (1/m or 1/sqrt(z), a positive normal FP16) with the
// exponent correction produced by domain reduction, i.e. returns
// p * 2^exp_adj by adding exp_adj to the exponent field. A zero p stays zero;
// a result exponent above the FP16 range saturates to infinity and one below
// the normal range flushes to zero (never reached for inputs in the
// documented range). Combinational.
module pwpa_post_process
  import nl_pkg::*;
(
  input  fp16_t      p_i,
  input  logic [4:0] exp_adj_i,
  output fp16_t      y_o
);

  logic signed [6:0] f;

  always_comb begin
    f = $signed({2'b0, p_i[14:10]}) + 7'($signed(exp_adj_i));
    if (p_i[14:10] == 5'd0)  y_o = {p_i[15], 15'd0};
    else if (f >= 7'sd31)    y_o = {p_i[15], 5'h1F, 10'd0};
    else if (f <= 7'sd0)     y_o = {p_i[15], 15'd0};
    else                     y_o = {p_i[15], 5'(f), p_i[9:0]};
  end

endmodule
