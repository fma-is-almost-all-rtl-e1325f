// RedMule-style FP16 GEMM engine extended to evaluate nonlinear functions
// (activations, softmax, layer normalisation) on its own FMA array.
//
// L rows of H computing elements (CEs), each an FP16 FMA with P pipeline
// stages. In GEMM mode a row computes z = y + sum_j x[j]*w[j] with X held
// stationary in the X buffer and W broadcast to all rows through the W
// buffer's systolic skew; results leave through the Z buffer. In the
// nonlinear modes the same CEs evaluate a degree-3, 8-partition piecewise
// polynomial (PWPA) with Horner's scheme, the shift by x_max, the softmax
// denominator sum, the layernorm moments, and a reciprocal or inverse square
// root (domain reduction + PWPA + exponent recombination). The additions
// for the nonlinear modes are a separate input buffer fed from the W stream,
// a separate output buffer, ParamMem (breakpoints, coefficients, x_max),
// and per row the partition detector, three coefficient selectors and the
// domain reduction / post-processing logic. Each row interleaves P
// sequences, so the engine holds P*L sequences per operation.
//
// Interfaces (valid/ready streams, a beat moves when both are high):
//   cfg_*    register writes (see nl_ctrl): MODE, LEN, INV_N, EPS, START
//   param_*  ParamMem words, consumed at the start of each load phase
//   xin_*    X rows for GEMM (H values per beat, L beats)
//   w_*      GEMM: W vector (H values); nonlinear modes: one element per row
//            in w_data_i[0..L-1] (requires L <= H)
//   y_*      GEMM bias, one value per row, paired with the W beat
//   out_*    GEMM Z column or nonlinear results, one value per row
// Latency through a row is H*P cycles; one beat per cycle at full rate.
// The streamers that move these streams to and from memory, and the host
// that programs the registers, are outside this module. Linear and
// nonlinear operations run one after the other here, not overlapped.
module redmule_nl
  import nl_pkg::*;
#(
  parameter int unsigned L = 8,
  parameter int unsigned H = 8,
  parameter int unsigned P = 2,
  parameter int unsigned BUF_DEPTH = 32,
  localparam int unsigned CW = $clog2(BUF_DEPTH) + 1
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                cfg_we_i,
  input  logic [2:0]          cfg_addr_i,
  input  logic [15:0]         cfg_wdata_i,
  output logic                busy_o,
  output logic                done_o,
  input  logic                param_valid_i,
  output logic                param_ready_o,
  input  fp16_t               param_data_i,
  input  logic                xin_valid_i,
  output logic                xin_ready_o,
  input  fp16_t [H-1:0]       xin_data_i,
  input  logic                w_valid_i,
  output logic                w_ready_o,
  input  fp16_t [H-1:0]       w_data_i,
  input  logic                y_valid_i,
  output logic                y_ready_o,
  input  fp16_t [L-1:0]       y_data_i,
  output logic                out_valid_o,
  input  logic                out_ready_i,
  output fp16_t [L-1:0]       out_data_o
);

  localparam int unsigned SW   = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned PMAW = $clog2(PM_SHIFT_BASE + L * P);
  localparam int unsigned RW   = (L > 1) ? $clog2(L) : 1;

  if (L > H) begin : g_check
    $error("nonlinear input beats use the W stream: L must not exceed H");
  end

  mode_e             mode;
  fp16_t             inv_n, eps;
  logic              pm_we, xb_we, wy_ready, ibuf_pop, ibuf_valid, issue, first;
  logic [PMAW-1:0]   pm_waddr;
  logic [RW-1:0]     xb_row;
  logic [SW-1:0]     slot;
  row_op_e           op;
  logic [CW-1:0]     zbuf_count, obuf_count, ibuf_count;
  logic              ibuf_in_ready;
  fp16_t [L-1:0]     ibuf_data;

  fp16_t [PW_NBP-1:0]                 bp;
  fp16_t [PW_NCOEF-1:0][PW_NPART-1:0] coef;
  fp16_t [L-1:0][P-1:0]               shift;
  fp16_t [L-1:0][H-1:0]               xs;
  fp16_t [H-1:0]                      w_skew;
  fp16_t [L-1:0]                      row_data;
  logic  [L-1:0]                      row_valid;
  fp16_t [L-1:0][P-1:0]               denom, recip;

  nl_ctrl #(.L(L), .H(H), .P(P), .OBUF_DEPTH(BUF_DEPTH)) u_ctrl (
    .clk_i, .rst_ni,
    .cfg_we_i, .cfg_addr_i, .cfg_wdata_i, .busy_o, .done_o,
    .mode_o(mode), .inv_n_o(inv_n), .eps_o(eps),
    .param_valid_i, .param_ready_o, .pm_we_o(pm_we), .pm_waddr_o(pm_waddr),
    .xin_valid_i, .xin_ready_o, .xb_we_o(xb_we), .xb_row_o(xb_row),
    .w_valid_i, .y_valid_i, .wy_ready_o(wy_ready),
    .ibuf_valid_i(ibuf_valid), .ibuf_pop_o(ibuf_pop),
    .zbuf_count_i(zbuf_count), .obuf_count_i(obuf_count), .row_valid_i(row_valid[0]),
    .op_o(op), .issue_o(issue), .slot_o(slot), .first_o(first)
  );

  param_mem #(.L(L), .P(P)) u_pmem (
    .clk_i, .rst_ni, .we_i(pm_we), .waddr_i(pm_waddr), .wdata_i(param_data_i),
    .bp_o(bp), .coef_o(coef), .shift_o(shift)
  );

  x_buffer #(.L(L), .H(H)) u_xbuf (
    .clk_i, .rst_ni, .we_i(xb_we), .wrow_i(xb_row), .wdata_i(xin_data_i), .x_o(xs)
  );

  w_buffer #(.H(H), .P(P)) u_wbuf (
    .clk_i, .rst_ni, .w_i((mode == MODE_GEMM && wy_ready) ? w_data_i : '0), .w_o(w_skew)
  );

  // nonlinear input buffer, filled from the W stream
  nl_fifo #(.WIDTH(16 * L), .DEPTH(BUF_DEPTH)) u_ibuf (
    .clk_i, .rst_ni,
    .in_valid_i(w_valid_i && mode != MODE_GEMM), .in_ready_o(ibuf_in_ready),
    .in_data_i(w_data_i[L-1:0]),
    .out_valid_o(ibuf_valid), .out_ready_i(ibuf_pop), .out_data_o(ibuf_data),
    .count_o(ibuf_count)
  );

  assign w_ready_o = (mode == MODE_GEMM) ? wy_ready : ibuf_in_ready;
  assign y_ready_o = wy_ready;

  for (genvar r = 0; r < L; r++) begin : g_row
    ce_row #(.H(H), .P(P)) u_row (
      .clk_i, .rst_ni,
      .op_i(op), .valid_i(issue), .slot_i(slot), .first_i(first),
      .data_i((mode == MODE_GEMM) ? y_data_i[r] : ibuf_data[r]),
      .x_i(xs[r]), .w_i(w_skew), .shift_i(shift[r]),
      .bp_i(bp), .coef_i(coef), .inv_n_i(inv_n), .eps_i(eps),
      .valid_o(row_valid[r]), .data_o(row_data[r]),
      .denom_o(denom[r]), .recip_o(recip[r])
    );
  end

  // output side: Z buffer (GEMM) and nonlinear output buffer, merged onto
  // the output stream
  logic          zbuf_valid, obuf_valid, zbuf_in_ready, obuf_in_ready;
  fp16_t [L-1:0] zbuf_data, obuf_data;

  nl_fifo #(.WIDTH(16 * L), .DEPTH(BUF_DEPTH)) u_zbuf (
    .clk_i, .rst_ni,
    .in_valid_i(row_valid[0] && mode == MODE_GEMM), .in_ready_o(zbuf_in_ready),
    .in_data_i(row_data),
    .out_valid_o(zbuf_valid), .out_ready_i(out_ready_i), .out_data_o(zbuf_data),
    .count_o(zbuf_count)
  );

  nl_fifo #(.WIDTH(16 * L), .DEPTH(BUF_DEPTH)) u_obuf (
    .clk_i, .rst_ni,
    .in_valid_i(row_valid[0] && mode != MODE_GEMM), .in_ready_o(obuf_in_ready),
    .in_data_i(row_data),
    .out_valid_o(obuf_valid), .out_ready_i(out_ready_i && !zbuf_valid), .out_data_o(obuf_data),
    .count_o(obuf_count)
  );

  assign out_valid_o = zbuf_valid || obuf_valid;
  assign out_data_o  = zbuf_valid ? zbuf_data : obuf_data;

  // credit counting in the controller guarantees room for every result
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   row_valid[0] |-> (mode == MODE_GEMM ? zbuf_in_ready : obuf_in_ready));
  assert property (@(posedge clk_i) disable iff (!rst_ni) row_valid == {L{row_valid[0]}});

endmodule
