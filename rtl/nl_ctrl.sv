// Controller of the engine: memory-mapped configuration registers and the
// FSM that sequences one operation as a short list of phases.
//
//   GEMM       X load (L beats), then LEN beats of W and Y through the rows
//   activation ParamMem load (39 words), one pass with op ACT
//   softmax    ParamMem load (39 words + one x_max per row and slot), pass 1
//              (SM_SUM), reload (39 words: reciprocal), RECIP, reload
//              (39 words: exponential), pass 2 (SM_OUT)
//   layernorm  ParamMem load (39 words: inverse square root), pass 1
//              (LN_STAT), LN_MU, LN_VAR, LN_EPS, ISQRT, pass 2 (LN_OUT)
//
// A pass streams P*LEN beats: beat b carries element b/P of the sequence in
// slot b%P of every row, so each row works on P sequences at once. Scalar
// phases issue one beat per slot. After every pass or scalar phase the FSM
// waits H*P cycles for the rows to drain. ParamMem words arrive on a stream
// and are written to consecutive addresses from 0. Beats that produce output
// are issued only while the target output buffer has room for them and for
// everything still in flight (credit counting), so the pipeline never has
// to stall. The phase lists follow the documented softmax and layernorm
// algorithms; the register map, the load protocol and the drain wait are
// choices of this implementation.
//
// Registers (cfg_we_i, word addresses): 0 MODE (mode_e), 1 LEN (elements
// per sequence, or W beats for GEMM), 2 INV_N (FP16 1/N), 3 EPS (FP16),
// 4 START (any write starts when idle). done_o stays high from the end of an
// operation until the next START.
module nl_ctrl
  import nl_pkg::*;
#(
  parameter int unsigned L = 8,
  parameter int unsigned H = 8,
  parameter int unsigned P = 2,
  parameter int unsigned OBUF_DEPTH = 32,
  localparam int unsigned SW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned PMAW = $clog2(PM_SHIFT_BASE + L * P),
  localparam int unsigned RW = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned CW = $clog2(OBUF_DEPTH) + 1
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  // configuration
  input  logic            cfg_we_i,
  input  logic [2:0]      cfg_addr_i,
  input  logic [15:0]     cfg_wdata_i,
  output logic            busy_o,
  output logic            done_o,
  output mode_e           mode_o,
  output fp16_t           inv_n_o,
  output fp16_t           eps_o,
  // ParamMem load stream
  input  logic            param_valid_i,
  output logic            param_ready_o,
  output logic            pm_we_o,
  output logic [PMAW-1:0] pm_waddr_o,
  // X buffer load stream
  input  logic            xin_valid_i,
  output logic            xin_ready_o,
  output logic            xb_we_o,
  output logic [RW-1:0]   xb_row_o,
  // operand sources: GEMM W/Y streams, NL input buffer
  input  logic            w_valid_i,
  input  logic            y_valid_i,
  output logic            wy_ready_o,
  input  logic            ibuf_valid_i,
  output logic            ibuf_pop_o,
  // output buffers
  input  logic [CW-1:0]   zbuf_count_i,
  input  logic [CW-1:0]   obuf_count_i,
  input  logic            row_valid_i,
  // row control
  output row_op_e         op_o,
  output logic            issue_o,
  output logic [SW-1:0]   slot_o,
  output logic            first_o
);

  typedef enum logic [2:0] {S_IDLE, S_XLOAD, S_LOAD, S_STREAM, S_SCALAR, S_DRAIN, S_DONE} state_e;

  typedef struct packed {
    state_e  kind;      // S_XLOAD, S_LOAD, S_STREAM, S_SCALAR or S_DONE
    row_op_e op;
    logic    with_shift; // load also the per-row shift words
  } phase_t;

  localparam int unsigned NPW = PM_SHIFT_BASE;            // 39 words
  localparam int unsigned NPW_SHIFT = PM_SHIFT_BASE + L * P;
  localparam int unsigned DRAIN_CYC = H * P + 1;

  state_e      state_q;
  mode_e       mode_q;
  logic [15:0] len_q;
  fp16_t       inv_n_q, eps_q;
  logic [3:0]  step_q;
  logic [31:0] cnt_q;
  logic [CW:0] inflight_q;
  row_op_e     op_q;        // op of the beats in flight; held while draining
  phase_t      ph;
  logic        start;

  function automatic phase_t phase_of(mode_e m, logic [3:0] s);
    phase_t p;
    p = '{kind: S_DONE, op: ROW_GEMM, with_shift: 1'b0};
    unique case (m)
      MODE_GEMM: case (s)
        4'd0: p = '{S_XLOAD,  ROW_GEMM, 1'b0};
        4'd1: p = '{S_STREAM, ROW_GEMM, 1'b0};
        default: ;
      endcase
      MODE_ACT: case (s)
        4'd0: p = '{S_LOAD,   ROW_ACT, 1'b0};
        4'd1: p = '{S_STREAM, ROW_ACT, 1'b0};
        default: ;
      endcase
      MODE_SOFTMAX: case (s)
        4'd0: p = '{S_LOAD,   ROW_SM_SUM, 1'b1};
        4'd1: p = '{S_STREAM, ROW_SM_SUM, 1'b0};
        4'd2: p = '{S_LOAD,   ROW_RECIP,  1'b0};
        4'd3: p = '{S_SCALAR, ROW_RECIP,  1'b0};
        4'd4: p = '{S_LOAD,   ROW_SM_OUT, 1'b0};
        4'd5: p = '{S_STREAM, ROW_SM_OUT, 1'b0};
        default: ;
      endcase
      MODE_LAYERNORM: case (s)
        4'd0: p = '{S_LOAD,   ROW_ISQRT,   1'b0};
        4'd1: p = '{S_STREAM, ROW_LN_STAT, 1'b0};
        4'd2: p = '{S_SCALAR, ROW_LN_MU,   1'b0};
        4'd3: p = '{S_SCALAR, ROW_LN_VAR,  1'b0};
        4'd4: p = '{S_SCALAR, ROW_LN_EPS,  1'b0};
        4'd5: p = '{S_SCALAR, ROW_ISQRT,   1'b0};
        4'd6: p = '{S_STREAM, ROW_LN_OUT,  1'b0};
        default: ;
      endcase
      default: ;
    endcase
    return p;
  endfunction

  assign ph    = phase_of(mode_q, step_q);
  assign start = cfg_we_i && (cfg_addr_i == 3'd4) && (state_q == S_IDLE || state_q == S_DONE);

  // issue conditions
  logic        produces, room, src_ok, nl_mode, last_beat;
  logic [31:0] nbeats;
  logic [CW:0] tgt_count;

  always_comb begin
    nl_mode   = (mode_q != MODE_GEMM);
    produces  = op_q inside {ROW_GEMM, ROW_ACT, ROW_SM_OUT, ROW_LN_OUT};
    tgt_count = nl_mode ? (CW+1)'(obuf_count_i) : (CW+1)'(zbuf_count_i);
    room      = !produces || ((tgt_count + inflight_q) < (CW+1)'(OBUF_DEPTH));
    src_ok    = nl_mode ? ibuf_valid_i : (w_valid_i && y_valid_i);
    nbeats    = (state_q == S_SCALAR) ? P : (nl_mode ? P * 32'(len_q) : 32'(len_q));
    last_beat = (cnt_q == nbeats - 1);

    issue_o = 1'b0;
    if (state_q == S_STREAM) issue_o = src_ok && room;
    if (state_q == S_SCALAR) issue_o = 1'b1;
    ibuf_pop_o = issue_o && (state_q == S_STREAM) && nl_mode;
    wy_ready_o = issue_o && (state_q == S_STREAM) && !nl_mode;
    op_o       = op_q;
    slot_o     = SW'(cnt_q % P);
    first_o    = (cnt_q < P);

    param_ready_o = (state_q == S_LOAD);
    pm_we_o       = param_ready_o && param_valid_i;
    pm_waddr_o    = PMAW'(cnt_q);
    xin_ready_o   = (state_q == S_XLOAD);
    xb_we_o       = xin_ready_o && xin_valid_i;
    xb_row_o      = RW'(cnt_q);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q    <= S_IDLE;
      mode_q     <= MODE_GEMM;
      len_q      <= '0;
      inv_n_q    <= '0;
      eps_q      <= '0;
      step_q     <= '0;
      cnt_q      <= '0;
      inflight_q <= '0;
      op_q       <= ROW_GEMM;
    end else begin
      if (cfg_we_i && (state_q == S_IDLE || state_q == S_DONE)) begin
        unique case (cfg_addr_i)
          3'd0: mode_q  <= mode_e'(cfg_wdata_i[1:0]);
          3'd1: len_q   <= cfg_wdata_i;
          3'd2: inv_n_q <= cfg_wdata_i;
          3'd3: eps_q   <= cfg_wdata_i;
          default: ;
        endcase
      end

      inflight_q <= inflight_q + (CW+1)'(issue_o && produces) - (CW+1)'(row_valid_i);

      unique case (state_q)
        S_IDLE, S_DONE: if (start) begin
          state_q <= S_DRAIN;       // enter the first phase through the dispatcher
          step_q  <= '0;
          cnt_q   <= 32'(DRAIN_CYC);
        end
        S_XLOAD: if (xb_we_o) begin
          cnt_q <= cnt_q + 1;
          if (cnt_q == L - 1) begin state_q <= S_DRAIN; cnt_q <= 32'(DRAIN_CYC); step_q <= step_q + 1; end
        end
        S_LOAD: if (pm_we_o) begin
          cnt_q <= cnt_q + 1;
          if (cnt_q == (ph.with_shift ? NPW_SHIFT : NPW) - 1) begin
            state_q <= S_DRAIN; cnt_q <= 32'(DRAIN_CYC); step_q <= step_q + 1;
          end
        end
        S_STREAM, S_SCALAR: if (issue_o) begin
          cnt_q <= cnt_q + 1;
          if (last_beat) begin state_q <= S_DRAIN; cnt_q <= '0; step_q <= step_q + 1; end
        end
        S_DRAIN: begin
          // cnt_q counts the cycles since the last issue
          cnt_q <= cnt_q + 1;
          if (cnt_q >= DRAIN_CYC) begin
            state_q <= ph.kind;
            cnt_q   <= '0;
            if (ph.kind == S_STREAM || ph.kind == S_SCALAR) op_q <= ph.op;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o  = (state_q != S_IDLE) && (state_q != S_DONE);
  assign done_o  = (state_q == S_DONE);
  assign mode_o  = mode_q;
  assign inv_n_o = inv_n_q;
  assign eps_o   = eps_q;

  assert property (@(posedge clk_i) disable iff (!rst_ni) inflight_q <= (CW+1)'(OBUF_DEPTH));

endmodule
