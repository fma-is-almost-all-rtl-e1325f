// Testbench for ce_row on its own (H = 8, P = 2): GEMM dot products with a
// testbench-side W skew, GELU activation, the complete softmax sequence
// (SM_SUM, RECIP, SM_OUT) and the complete layernorm sequence (LN_STAT,
// LN_MU, LN_VAR, LN_EPS, ISQRT, LN_OUT) on two interleaved sequences.
// Every output is compared bit-exactly with the per-FMA-rounded reference
// and must leave exactly H*P cycles after its issue; the softmax
// denominators and reciprocals are checked on the scalar outputs too.
module tb_ce_row;
  import fp16_ref_pkg::*;
  import nl_pkg::*;
  localparam int H = 8, P = 2, LAT = H * P, N = 24;

  logic clk = 0, rst_n = 0;
  row_op_e op;
  logic vi, slot, first, vo;
  logic [15:0] din, dout;
  logic [H-1:0][15:0] x, w;
  logic [P-1:0][15:0] shift, denom, recip;
  logic [6:0][15:0] bp;
  logic [3:0][7:0][15:0] coef;
  logic [15:0] inv_n, eps;
  int checks = 0, failures = 0;
  longint cyc = 0;

  ce_row #(.H(H), .P(P)) dut (.clk_i(clk), .rst_ni(rst_n), .op_i(op), .valid_i(vi), .slot_i(slot),
    .first_i(first), .data_i(din), .x_i(x), .w_i(w), .shift_i(shift), .bp_i(bp), .coef_i(coef),
    .inv_n_i(inv_n), .eps_i(eps), .valid_o(vo), .data_o(dout), .denom_o(denom), .recip_o(recip));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic [15:0] exp_q [$];
  longint      due_q [$];
  logic [H-1:0][15:0] whist [$];   // W vectors in issue order, newest first
  logic [H-1:0][15:0] wcur;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // W skew done by the testbench: column j sees the vector of j*P cycles ago
  // (whist[0] is the vector of the previous cycle)
  always_comb begin
    w[0] = wcur[0];
    for (int j = 1; j < H; j++) w[j] = (whist.size() >= j * P) ? whist[j * P - 1][j] : 16'h0;
  end
  always @(posedge clk) begin
    whist.push_front(wcur);
    if (whist.size() > LAT) void'(whist.pop_back());
  end

  always @(posedge clk) if (rst_n) begin
    if (vo) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        logic [15:0] e; longint d;
        e = exp_q.pop_front(); d = due_q.pop_front();
        if (dout !== e || cyc != d) begin
          failures++;
          if (failures < 10) $display("FAIL got %h exp %h at %0d due %0d", dout, e, cyc, d);
        end
      end
    end
  end

  task automatic load_tab(pwpa_tab_t t);
    for (int i = 0; i < 7; i++) bp[i] = t.bp[i];
    for (int p = 0; p < 8; p++) for (int s = 0; s < 4; s++) coef[s][p] = t.coef[p][s];
  endtask

  task automatic issue(row_op_e o, int s, bit f, logic [15:0] d, bit produces, logic [15:0] e);
    @(negedge clk);
    op = o; vi = 1; slot = 1'(s); first = f; din = d;
    if (produces) begin exp_q.push_back(e); due_q.push_back(cyc + LAT); end
    @(negedge clk);
    vi = 0;
    #0;
  endtask

  // back-to-back issue of one element per cycle
  task automatic issue_stream(row_op_e o, logic [15:0] d [], int slots [], bit firsts [],
                              logic [15:0] e [], bit produces);
    for (int i = 0; i < d.size(); i++) begin
      @(negedge clk);
      op = o; vi = 1; slot = 1'(slots[i]); first = firsts[i]; din = d[i];
      if (produces) begin exp_q.push_back(e[i]); due_q.push_back(cyc + LAT); end
    end
    @(negedge clk);
    vi = 0;
  endtask

  task automatic drain();
    repeat (LAT + 2) @(negedge clk);
  endtask

  initial begin
    pwpa_tab_t te, tr, ts, tg;
    logic [15:0] xs [P][N];
    logic [15:0] d [], e [];
    int sl [];
    bit fi [];
    logic [15:0] xmax [P], den [P], rd [P], mu [P], var_ [P], rr [P], s_ [P], q_ [P];

    op = ROW_GEMM; vi = 0; slot = 0; first = 0; din = 0; x = '0; wcur = '0;
    shift = '0; bp = '0; coef = '0; inv_n = 0; eps = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- GEMM: z = y + sum_j x[j]*w[j], new W and y every cycle
    for (int j = 0; j < H; j++) x[j] = rand_fp16(12, 16);
    for (int n = 0; n < 40; n++) begin
      logic [15:0] y, acc;
      @(negedge clk);
      for (int j = 0; j < H; j++) wcur[j] = rand_fp16(12, 16);
      y = rand_fp16(12, 16);
      acc = y;
      for (int j = 0; j < H; j++) acc = fma_r(x[j], wcur[j], acc);
      op = ROW_GEMM; vi = 1; din = y;
      exp_q.push_back(acc); due_q.push_back(cyc + LAT);
    end
    @(negedge clk); vi = 0;
    drain();

    // ---- GELU activation
    tg = tab_act(4);
    load_tab(tg);
    d = new[2 * N]; e = new[2 * N]; sl = new[2 * N]; fi = new[2 * N];
    for (int i = 0; i < 2 * N; i++) begin
      d[i] = real_to_fp16((($urandom % 1000) / 1000.0) * 14.0 - 7.0);
      e[i] = pwpa_r(tg, d[i]); sl[i] = i % P; fi[i] = (i < P);
    end
    issue_stream(ROW_ACT, d, sl, fi, e, 1);
    drain();

    // ---- softmax on two interleaved sequences
    te = tab_exp(); tr = tab_recip();
    for (int s = 0; s < P; s++) begin
      xmax[s] = 16'hFC00;
      for (int i = 0; i < N; i++) begin
        xs[s][i] = real_to_fp16((($urandom % 1000) / 1000.0) * 8.0 - 4.0);
        if (fp16_to_real(xs[s][i]) > fp16_to_real(xmax[s])) xmax[s] = xs[s][i];
      end
      shift[s] = xmax[s];
      den[s] = 16'h0000;
      for (int i = 0; i < N; i++) den[s] = fma_r(pwpa_r(te, fma_r(16'hBC00, xmax[s], xs[s][i])), 16'h3C00, den[s]);
      rd[s] = recip_r(tr, den[s]);
    end
    load_tab(te);
    for (int i = 0; i < 2 * N; i++) begin
      d[i] = xs[i % P][i / P]; sl[i] = i % P; fi[i] = (i < P);
      e[i] = fma_r(pwpa_r(te, fma_r(16'hBC00, xmax[i % P], d[i])), rd[i % P], 16'h8000);
    end
    issue_stream(ROW_SM_SUM, d, sl, fi, e, 0);
    drain();
    for (int s = 0; s < P; s++) begin
      checks++;
      if (denom[s] !== den[s]) begin failures++; $display("FAIL denominator %0d: %h vs %h", s, denom[s], den[s]); end
    end
    load_tab(tr);
    for (int s = 0; s < P; s++) issue(ROW_RECIP, s, 0, 16'h0, 0, 16'h0);
    drain();
    for (int s = 0; s < P; s++) begin
      checks++;
      if (recip[s] !== rd[s]) begin failures++; $display("FAIL reciprocal %0d: %h vs %h", s, recip[s], rd[s]); end
    end
    load_tab(te);
    issue_stream(ROW_SM_OUT, d, sl, fi, e, 1);
    drain();

    // ---- layernorm on two interleaved sequences
    ts = tab_isqrt();
    load_tab(ts);
    inv_n = real_to_fp16(1.0 / N);
    eps = 16'h1400;
    for (int s = 0; s < P; s++) begin
      s_[s] = 16'h0; q_[s] = 16'h0;
      for (int i = 0; i < N; i++) begin
        q_[s] = fma_r(fma_r(xs[s][i], inv_n, 16'h8000), xs[s][i], q_[s]);
        s_[s] = fma_r(xs[s][i], 16'h3C00, s_[s]);
      end
      mu[s]   = fma_r(s_[s], inv_n, 16'h8000);
      var_[s] = fma_r(fma_r(mu[s] ^ 16'h8000, mu[s], q_[s]), 16'h3C00, eps);
      rr[s]   = isqrt_r(ts, var_[s]);
    end
    for (int i = 0; i < 2 * N; i++)
      e[i] = fma_r(fma_r(16'hBC00, mu[i % P], d[i]), rr[i % P], 16'h8000);
    issue_stream(ROW_LN_STAT, d, sl, fi, e, 0);
    drain();
    for (int s = 0; s < P; s++) issue(ROW_LN_MU, s, 0, 16'h0, 0, 16'h0);
    drain();
    for (int s = 0; s < P; s++) issue(ROW_LN_VAR, s, 0, 16'h0, 0, 16'h0);
    drain();
    for (int s = 0; s < P; s++) issue(ROW_LN_EPS, s, 0, 16'h0, 0, 16'h0);
    drain();
    for (int s = 0; s < P; s++) issue(ROW_ISQRT, s, 0, 16'h0, 0, 16'h0);
    drain();
    for (int s = 0; s < P; s++) begin
      checks++;
      if (recip[s] !== rr[s]) begin failures++; $display("FAIL 1/sqrt %0d: %h vs %h", s, recip[s], rr[s]); end
    end
    issue_stream(ROW_LN_OUT, d, sl, fi, e, 1);
    drain();

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
