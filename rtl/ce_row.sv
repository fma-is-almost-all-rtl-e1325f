// One row of H computing elements (CEs), shared between GEMM and nonlinear
// (PWPA) execution.
//
// Every CE is an FP16 FMA with P pipeline stages. A side band travels with
// each operation along the row, delayed exactly like the CEs: the valid bit,
// the interleave slot, a "first element" flag, the main datum d, the shifted
// input x' and its 3-bit partition id, and the raw input. P independent
// sequences are interleaved slot by slot (slot = issue order modulo P), so
// a CE that feeds its own result back (an accumulator) always sees the
// previous element of the same sequence: no extra reduction stage.
//
// Per operation (op_i, see nl_pkg::row_op_e), the CEs compute
//   GEMM        CEj: x[j]*w[j] + (CE0: y  |  CEj>0: partial sum of CE j-1)
//   ACT         CE0: x - 0; CE2..CE4: Horner  P0 = a x'+b, P1 = P0 x'+c,
//               P2 = P1 x'+d; CE1, CE5..CE7 bypass
//   SM_SUM      CE0: x' = x - x_max[slot]; CE2..CE4 Horner (exp);
//               CE5: D[slot] += P2
//   RECIP       CE0 takes D[slot] reduced to [1,2) (5-bit exponent kept per
//               slot); CE2..CE4 Horner (1/m); post-processing gives 1/D[slot]
//   SM_OUT      as SM_SUM up to CE4; CE5: y = P2 * (1/D[slot])
//   LN_STAT     CE0: t = x*(1/N); CE5: q[slot] += t*x; CE6: s[slot] += x
//   LN_MU       CE0: mu[slot]  = s[slot]*(1/N)
//   LN_VAR      CE0: var[slot] = q[slot] - mu[slot]^2
//   LN_EPS      CE0: var[slot] = var[slot] + eps
//   ISQRT       CE0 takes var[slot] reduced to [1,4); CE2..CE4 Horner
//               (1/sqrt z); post-processing gives r[slot]
//   LN_OUT      CE0: x - mu[slot]; CE5: y = (x - mu[slot]) * r[slot]
// The partition detector sits at the CE1 input (on x'), the three
// coefficient selectors at CE2..CE4, domain reduction at the CE0 input and
// post-processing at the CE5 input, as in the softmax data flow of the
// design. The mapping of the layernorm steps onto CE0, CE5 and CE6, the
// bypass multiplexers and the uniform H*P latency for every operation are
// choices of this implementation.
//
// Timing: an operation issued with valid_i at cycle t leaves at t + H*P;
// valid_o is raised only for operations that produce a stream output (GEMM,
// ACT, SM_OUT, LN_OUT). Scalar results (D, 1/D, s, q, mu, var, r) stay in
// per-slot registers; the controller must let the row drain before starting
// an operation that reads them. One operation per cycle, no stalls.
module ce_row
  import nl_pkg::*;
#(
  parameter int unsigned H = 8,
  parameter int unsigned P = 2,
  localparam int unsigned SW = (P > 1) ? $clog2(P) : 1
) (
  input  logic                                clk_i,
  input  logic                                rst_ni,
  input  row_op_e                             op_i,
  input  logic                                valid_i,
  input  logic [SW-1:0]                       slot_i,
  input  logic                                first_i,
  input  fp16_t                               data_i,     // x (NL) or y (GEMM)
  input  fp16_t [H-1:0]                       x_i,        // stationary X
  input  fp16_t [H-1:0]                       w_i,        // skewed W
  input  fp16_t [P-1:0]                       shift_i,    // x_max per slot
  input  fp16_t [PW_NBP-1:0]                  bp_i,
  input  fp16_t [PW_NCOEF-1:0][PW_NPART-1:0]  coef_i,
  input  fp16_t                               inv_n_i,    // 1/N
  input  fp16_t                               eps_i,
  output logic                                valid_o,
  output fp16_t                               data_o,
  output fp16_t [P-1:0]                       denom_o,    // D per slot
  output fp16_t [P-1:0]                       recip_o     // 1/D or r per slot
);

  localparam fp16_t NEG_ZERO = 16'h8000;

  typedef struct packed {
    logic              valid;
    logic [SW-1:0]     slot;
    logic              first;
    fp16_t             d;
    fp16_t             xp;
    logic [PW_IDW-1:0] pid;
    fp16_t             raw;
  } sb_t;

  // per-slot scalar registers
  fp16_t      acc5_q [P];    // D (softmax) or q (layernorm)
  fp16_t      acc6_q [P];    // s (layernorm)
  fp16_t      mu_q   [P];
  fp16_t      var_q  [P];
  fp16_t      rr_q   [P];    // 1/D or 1/sqrt(var + eps)
  logic [4:0] eadj_q [P];

  sb_t   st_in  [H];         // bundle entering CE j
  sb_t   st_out [H];         // bundle leaving CE j (after bypass mux)
  sb_t   sb_dly [H][P];
  fp16_t ce_a [H], ce_b [H], ce_c [H], ce_res [H];
  logic  ce_vld [H];
  logic  byp [H];

  // domain reduction at the CE0 input
  fp16_t      dr_in, dr_m;
  logic [4:0] dr_adj;
  logic       dr_isqrt;

  assign dr_isqrt = (op_i == ROW_ISQRT);
  assign dr_in    = dr_isqrt ? var_q[slot_i] : acc5_q[slot_i];

  pwpa_domain_reduction u_dr (
    .x_i(dr_in), .isqrt_i(dr_isqrt), .m_o(dr_m), .exp_adj_o(dr_adj)
  );

  // partition detection on x' at the CE1 input
  logic [PW_IDW-1:0] pid_det;
  pwpa_part_detect u_pd (.x_i(st_out[0].d), .bp_i(bp_i), .id_o(pid_det));

  // coefficient selection for the three Horner stages
  fp16_t coef_sel [PW_NCOEF];
  for (genvar s = 0; s < PW_NCOEF; s++) begin : g_csel
    // stage a and b are used by CE2, c by CE3, d by CE4
    logic [PW_IDW-1:0] sel_id;
    assign sel_id = (s < 2) ? st_in[2].pid : st_in[s+1].pid;
    pwpa_coeff_select u_cs (.coef_i(coef_i[s]), .id_i(sel_id), .coef_o(coef_sel[s]));
  end

  // post-processing at the CE5 input
  fp16_t pp_y;
  pwpa_post_process u_pp (.p_i(st_in[5].d), .exp_adj_i(eadj_q[st_in[5].slot]), .y_o(pp_y));

  // accumulator operands with forwarding of the result leaving the CE now
  fp16_t acc5_fwd, acc6_fwd;
  always_comb begin
    acc5_fwd = acc5_q[st_in[5].slot];
    if (st_out[5].valid && st_out[5].slot == st_in[5].slot) acc5_fwd = ce_res[5];
    acc6_fwd = acc6_q[st_in[6].slot];
    if (st_out[6].valid && st_out[6].slot == st_in[6].slot) acc6_fwd = ce_res[6];
  end

  // stage-0 input bundle
  always_comb begin
    st_in[0].valid = valid_i;
    st_in[0].slot  = slot_i;
    st_in[0].first = first_i;
    st_in[0].d     = (op_i == ROW_RECIP || op_i == ROW_ISQRT) ? dr_m : data_i;
    st_in[0].xp    = '0;
    st_in[0].pid   = '0;
    st_in[0].raw   = data_i;
    for (int j = 1; j < H; j++) begin
      st_in[j] = st_out[j-1];
      if (j == 1) begin
        st_in[j].xp  = st_out[0].d;
        st_in[j].pid = pid_det;
      end
    end
  end

  // operand selection per CE
  always_comb begin
    for (int j = 0; j < H; j++) begin
      ce_a[j] = x_i[j];
      ce_b[j] = w_i[j];
      ce_c[j] = (j == 0) ? st_in[0].d : st_in[j].d;
      byp[j]  = (op_i != ROW_GEMM);
    end
    if (op_i != ROW_GEMM) begin
      // CE0
      byp[0] = 1'b0;
      unique case (op_i)
        ROW_LN_STAT: begin ce_a[0] = st_in[0].d; ce_b[0] = inv_n_i; ce_c[0] = NEG_ZERO; end
        ROW_LN_MU:   begin ce_a[0] = acc6_q[slot_i]; ce_b[0] = inv_n_i; ce_c[0] = NEG_ZERO; end
        ROW_LN_VAR:  begin ce_a[0] = mu_q[slot_i] ^ 16'h8000; ce_b[0] = mu_q[slot_i];
                           ce_c[0] = acc5_q[slot_i]; end
        ROW_LN_EPS:  begin ce_a[0] = var_q[slot_i]; ce_b[0] = FP16_ONE; ce_c[0] = eps_i; end
        ROW_SM_SUM, ROW_SM_OUT:
                     begin ce_a[0] = FP16_NEG_ONE; ce_b[0] = shift_i[slot_i]; ce_c[0] = st_in[0].d; end
        ROW_LN_OUT:  begin ce_a[0] = FP16_NEG_ONE; ce_b[0] = mu_q[slot_i]; ce_c[0] = st_in[0].d; end
        default:     begin ce_a[0] = FP16_NEG_ONE; ce_b[0] = FP16_ZERO; ce_c[0] = st_in[0].d; end
      endcase
      // CE2..CE4: Horner stages of the degree-3 PWPA
      if (op_i inside {ROW_ACT, ROW_SM_SUM, ROW_SM_OUT, ROW_RECIP, ROW_ISQRT}) begin
        byp[2] = 1'b0; ce_a[2] = coef_sel[0]; ce_b[2] = st_in[2].xp; ce_c[2] = coef_sel[1];
        byp[3] = 1'b0; ce_a[3] = st_in[3].d;  ce_b[3] = st_in[3].xp; ce_c[3] = coef_sel[2];
        byp[4] = 1'b0; ce_a[4] = st_in[4].d;  ce_b[4] = st_in[4].xp; ce_c[4] = coef_sel[3];
      end
      // CE5
      if (op_i == ROW_SM_SUM) begin
        byp[5] = 1'b0; ce_a[5] = st_in[5].d; ce_b[5] = FP16_ONE;
        ce_c[5] = st_in[5].first ? FP16_ZERO : acc5_fwd;
      end else if (op_i == ROW_LN_STAT) begin
        byp[5] = 1'b0; ce_a[5] = st_in[5].d; ce_b[5] = st_in[5].raw;
        ce_c[5] = st_in[5].first ? FP16_ZERO : acc5_fwd;
      end else if (op_i == ROW_SM_OUT || op_i == ROW_LN_OUT) begin
        byp[5] = 1'b0; ce_a[5] = st_in[5].d; ce_b[5] = rr_q[st_in[5].slot]; ce_c[5] = NEG_ZERO;
      end
      // CE6
      if (op_i == ROW_LN_STAT) begin
        byp[6] = 1'b0; ce_a[6] = st_in[6].raw; ce_b[6] = FP16_ONE;
        ce_c[6] = st_in[6].first ? FP16_ZERO : acc6_fwd;
      end
    end
  end

  // CEs and side-band delay lines
  for (genvar j = 0; j < H; j++) begin : g_ce
    redmule_ce #(.PIPE(P)) u_ce (
      .clk_i, .rst_ni,
      .valid_i(st_in[j].valid),
      .a_i(ce_a[j]), .b_i(ce_b[j]), .c_i(ce_c[j]),
      .valid_o(ce_vld[j]), .res_o(ce_res[j])
    );

    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        for (int k = 0; k < P; k++) sb_dly[j][k] <= '0;
      end else begin
        sb_dly[j][0] <= st_in[j];
        for (int k = 1; k < P; k++) sb_dly[j][k] <= sb_dly[j][k-1];
      end
    end

    always_comb begin
      st_out[j] = sb_dly[j][P-1];
      if (!byp[j]) st_out[j].d = ce_res[j];
    end

    assert property (@(posedge clk_i) disable iff (!rst_ni) ce_vld[j] == sb_dly[j][P-1].valid);
  end

  // scalar result registers
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int s = 0; s < P; s++) begin
        acc5_q[s] <= '0; acc6_q[s] <= '0; mu_q[s] <= '0;
        var_q[s]  <= '0; rr_q[s]   <= '0; eadj_q[s] <= '0;
      end
    end else begin
      if (valid_i && (op_i == ROW_RECIP || op_i == ROW_ISQRT)) eadj_q[slot_i] <= dr_adj;
      if (st_out[0].valid) begin
        unique case (op_i)
          ROW_LN_MU:              mu_q[st_out[0].slot]  <= ce_res[0];
          ROW_LN_VAR, ROW_LN_EPS: var_q[st_out[0].slot] <= ce_res[0];
          default: ;
        endcase
      end
      if (st_in[5].valid && (op_i == ROW_RECIP || op_i == ROW_ISQRT))
        rr_q[st_in[5].slot] <= pp_y;
      if (st_out[5].valid && (op_i == ROW_SM_SUM || op_i == ROW_LN_STAT))
        acc5_q[st_out[5].slot] <= ce_res[5];
      if (st_out[6].valid && op_i == ROW_LN_STAT)
        acc6_q[st_out[6].slot] <= ce_res[6];
    end
  end

  assign valid_o = st_out[H-1].valid &&
                   (op_i inside {ROW_GEMM, ROW_ACT, ROW_SM_OUT, ROW_LN_OUT});
  assign data_o  = st_out[H-1].d;

  always_comb for (int s = 0; s < P; s++) begin
    denom_o[s] = acc5_q[s];
    recip_o[s] = rr_q[s];
  end

endmodule
