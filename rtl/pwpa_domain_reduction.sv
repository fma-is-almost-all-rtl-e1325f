// Domain reduction ahead of the reciprocal and inverse-square-root PWPA.
// A positive FP16 x = 2^E * m, m in [1,2), is split into
//   reciprocal:   m in [1,2)  and the exponent correction -E,
//   inverse sqrt: z = m (E even) or 2m (E odd), z in [1,4), and -floor(E/2),
// so that 1/x = 2^-E * PWPA(m) and 1/sqrt(x) = 2^-floor(E/2) * PWPA(z).
// The correction is a 5-bit two's-complement value, held by the caller in a
// 5-bit register per interleaved row. Only the exponent field is touched,
// so the unit is a few adders and muxes. Inputs are assumed positive and
// normal (the softmax denominator and variance + eps are); a subnormal or
// zero input is treated as the smallest normal 2^-14 and the sign is ignored.
// Combinational.
module pwpa_domain_reduction
  import nl_pkg::*;
(
  input  fp16_t       x_i,
  input  logic        isqrt_i,   // 0: reciprocal, 1: inverse square root
  output fp16_t       m_o,       // reduced operand
  output logic [4:0]  exp_adj_o  // exponent to add after the PWPA
);

  logic [4:0]        field;
  logic signed [5:0] e, k;

  always_comb begin
    field = (x_i[14:10] == 5'd0) ? 5'd1 : x_i[14:10];
    e     = $signed({1'b0, field}) - 6'sd15;
    k     = e >>> 1;                       // floor(E/2)
    m_o   = {1'b0, 5'd15, (x_i[14:10] == 5'd0) ? 10'd0 : x_i[9:0]};
    if (!isqrt_i) begin
      exp_adj_o = 5'(-e);
    end else begin
      if (e[0]) m_o[14:10] = 5'd16;        // odd exponent folds into z = 2m
      exp_adj_o = 5'(-k);
    end
  end

endmodule
