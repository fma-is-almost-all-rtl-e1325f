// Workload sweep of redmule_nl at its default size: softmax over sequence
// lengths, layernorm over embedding sizes and GELU activation over element
// counts of 32, 64, 128, 256, 512 and 1024 per sequence (16 sequences per
// operation), plus the attention-block sizes of a ViT-B model (softmax over
// 197 scores, layernorm over 768 features). Streams run without bubbles or
// back-pressure. Every output is checked bit-exactly and against the true
// function; the measured elements/cycle must grow with the size and reach
// at least 95% of the ideal (8 for activation, 4 for the two-pass kernels)
// at 1024.
module tb_redmule_nl_sweep;
  import fp16_ref_pkg::*;
  import nl_pkg::*;

  localparam int L = 8, H = 8, P = 2, NSEQ = L * P;

  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [2:0] cfg_addr; logic [15:0] cfg_wdata;
  logic busy, done;
  logic param_valid, param_ready; logic [15:0] param_data;
  logic xin_valid, xin_ready; logic [H-1:0][15:0] xin_data;
  logic w_valid, w_ready; logic [H-1:0][15:0] w_data;
  logic y_valid, y_ready; logic [L-1:0][15:0] y_data;
  logic out_valid, out_ready; logic [L-1:0][15:0] out_data;

  redmule_nl dut (
    .clk_i(clk), .rst_ni(rst_n),
    .cfg_we_i(cfg_we), .cfg_addr_i(cfg_addr), .cfg_wdata_i(cfg_wdata), .busy_o(busy), .done_o(done),
    .param_valid_i(param_valid), .param_ready_o(param_ready), .param_data_i(param_data),
    .xin_valid_i(xin_valid), .xin_ready_o(xin_ready), .xin_data_i(xin_data),
    .w_valid_i(w_valid), .w_ready_o(w_ready), .w_data_i(w_data),
    .y_valid_i(y_valid), .y_ready_o(y_ready), .y_data_i(y_data),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_data_o(out_data)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_gemm = 0, n_act = 0, n_softmax = 0, n_ln = 0, n_reload = 0, n_credit_stall = 0,
      n_bubble = 0, n_fwd = 0, n_backpressure = 0;
  longint cyc = 0;
  real thr_act [$], thr_sm [$], thr_ln [$];

  // stimulus and expectation queues
  logic [15:0]        param_q [$];
  logic [H-1:0][15:0] x_q [$];
  logic [H-1:0][15:0] w_q [$];
  logic [L-1:0][15:0] y_q [$];
  logic [L-1:0][15:0] exp_q [$];
  real                true_q [$];      // L values per output beat
  real                tol;
  real                max_err;
  int                 bubble_pct = 20;
  int                 block_pct  = 20;  // chance that the consumer is not ready

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // drivers
  always @(negedge clk) begin
    if (!rst_n) begin
      param_valid <= 0; xin_valid <= 0; w_valid <= 0; y_valid <= 0;
    end else begin
      param_valid <= 0; xin_valid <= 0; w_valid <= 0; y_valid <= 0;
      if (param_q.size() > 0 && ($urandom % 100) >= bubble_pct) begin param_valid <= 1; param_data <= param_q[0]; end
      if (x_q.size() > 0) begin xin_valid <= 1; xin_data <= x_q[0]; end
      if (w_q.size() > 0 && ($urandom % 100) >= bubble_pct) begin
        w_valid <= 1; w_data <= w_q[0];
        if (y_q.size() > 0) begin y_valid <= 1; y_data <= y_q[0]; end
      end else if (w_q.size() > 0) n_bubble++;
      out_ready <= ($urandom % 100) >= block_pct;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (param_valid && param_ready) void'(param_q.pop_front());
    if (xin_valid && xin_ready) void'(x_q.pop_front());
    if (w_valid && w_ready) begin
      void'(w_q.pop_front());
      if (y_valid && y_ready) void'(y_q.pop_front());
    end
    if (out_valid && !out_ready) n_backpressure++;
    if (dut.u_ctrl.state_q == dut.u_ctrl.S_STREAM && dut.u_ctrl.src_ok && !dut.u_ctrl.room) n_credit_stall++;
    if (dut.g_row[0].u_row.st_out[5].valid && dut.g_row[0].u_row.st_in[5].valid &&
        !dut.g_row[0].u_row.st_in[5].first &&
        dut.g_row[0].u_row.st_out[5].slot == dut.g_row[0].u_row.st_in[5].slot &&
        (dut.u_ctrl.op_o == ROW_SM_SUM || dut.u_ctrl.op_o == ROW_LN_STAT)) n_fwd++;
    if ($rose(param_ready)) n_reload++;
  end

  // output monitor
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (exp_q.size() == 0) fail("unexpected output");
    else begin
      logic [L-1:0][15:0] e;
      real t [L];
      e = exp_q.pop_front();
      for (int r = 0; r < L; r++) t[r] = true_q.pop_front();
      for (int r = 0; r < L; r++) begin
        real err;
        checks++;
        if (out_data[r] !== e[r])
          fail($sformatf("row %0d got %h expected %h", r, out_data[r], e[r]));
        err = absr(fp16_to_real(out_data[r]) - t[r]);
        if (err > max_err) max_err = err;
        checks++;
        if (err > tol) fail($sformatf("row %0d value %f true %f", r, fp16_to_real(out_data[r]), t[r]));
      end
    end
  end

  task automatic cfg(int a, logic [15:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 3'(a); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic push_tab(pwpa_tab_t t);
    for (int i = 0; i < 7; i++) param_q.push_back(t.bp[i]);
    for (int p = 0; p < 8; p++) for (int s = 0; s < 4; s++) param_q.push_back(t.coef[p][s]);
  endtask

  // start, wait for done and for all expected outputs; returns cycles
  task automatic run(mode_e m, int len, output longint cycles);
    longint t0;
    cfg(1, 16'(len));
    t0 = cyc;
    cfg(4, 16'd1);
    wait (done == 1'b0);
    wait (done == 1'b1);
    cycles = cyc - t0;
    while (exp_q.size() > 0) @(posedge clk);
    checks++;
    if (param_q.size() != 0 || w_q.size() != 0) fail("stimulus not consumed");
  endtask

  // ---------------------------------------------------------------- GEMM
  task automatic test_gemm(int k);
    logic [15:0] x [L][H];
    longint c;
    cfg(0, 16'(MODE_GEMM));   // the W stream is routed by MODE: set it first
    for (int r = 0; r < L; r++) begin
      logic [H-1:0][15:0] v;
      for (int j = 0; j < H; j++) begin x[r][j] = rand_fp16(12, 16); v[j] = x[r][j]; end
      x_q.push_back(v);
    end
    for (int n = 0; n < k; n++) begin
      logic [H-1:0][15:0] w;
      logic [L-1:0][15:0] y, z;
      real t [L];
      for (int j = 0; j < H; j++) w[j] = rand_fp16(12, 16);
      for (int r = 0; r < L; r++) y[r] = rand_fp16(12, 16);
      for (int r = 0; r < L; r++) begin
        logic [15:0] acc;
        acc = y[r];
        t[r] = fp16_to_real(y[r]);
        for (int j = 0; j < H; j++) begin
          acc = fma_r(x[r][j], w[j], acc);
          t[r] += fp16_to_real(x[r][j]) * fp16_to_real(w[j]);
        end
        z[r] = acc;
      end
      w_q.push_back(w); y_q.push_back(y); exp_q.push_back(z); for (int r = 0; r < L; r++) true_q.push_back(t[r]);
    end
    tol = 0.05;
    run(MODE_GEMM, k, c);
    n_gemm++;
  endtask

  // ------------------------------------------------------------ activation
  task automatic test_act(int kind, int len);
    pwpa_tab_t tb;
    longint c;
    real thr;
    cfg(0, 16'(MODE_ACT));
    tb = tab_act(kind);
    push_tab(tb);
    for (int b = 0; b < P * len; b++) begin
      logic [H-1:0][15:0] w;
      logic [L-1:0][15:0] e;
      real t [L];
      w = '0;
      for (int r = 0; r < L; r++) begin
        w[r] = real_to_fp16((($urandom % 10000) / 10000.0) * 12.0 - 6.0);
        e[r] = pwpa_r(tb, w[r]);
        t[r] = fn(kind, fp16_to_real(w[r]));
      end
      w_q.push_back(w); exp_q.push_back(e); for (int r = 0; r < L; r++) true_q.push_back(t[r]);
    end
    tol = 0.02;
    run(MODE_ACT, len, c);
    n_act++;
    thr = real'(L * P * len) / real'(c);
    $display("activation %s len=%0d: %0d cycles, %f elements/cycle", kind == 3 ? "SiLU" : "GELU", len, c, thr);
    if (len >= 1024 && bubble_pct == 0) begin checks++; if (thr < 7.6) fail("activation throughput"); end
    thr_act.push_back(thr);
  endtask

  // --------------------------------------------------------------- softmax
  task automatic test_softmax(int len);
    pwpa_tab_t te, tr;
    logic [15:0] x [NSEQ][];
    logic [15:0] xmax [NSEQ], d [NSEQ], rd [NSEQ];
    real tsum [NSEQ], tmax [NSEQ];
    longint c;
    real thr;
    cfg(0, 16'(MODE_SOFTMAX));
    te = tab_exp(); tr = tab_recip();
    for (int q = 0; q < NSEQ; q++) begin
      x[q] = new[len];
      tmax[q] = -1.0e9;
      for (int i = 0; i < len; i++) begin
        x[q][i] = real_to_fp16((($urandom % 10000) / 10000.0) * 10.0 - 5.0);
        if (fp16_to_real(x[q][i]) > tmax[q]) begin tmax[q] = fp16_to_real(x[q][i]); xmax[q] = x[q][i]; end
      end
    end
    // sequence q = P*row + slot; ParamMem: exp table + x_max, reciprocal, exp
    push_tab(te);
    for (int q = 0; q < NSEQ; q++) param_q.push_back(xmax[q]);
    push_tab(tr);
    push_tab(te);
    // model
    for (int q = 0; q < NSEQ; q++) begin
      d[q] = 16'h0000; tsum[q] = 0.0;
      for (int i = 0; i < len; i++) begin
        d[q] = fma_r(pwpa_r(te, fma_r(16'hBC00, xmax[q], x[q][i])), 16'h3C00, d[q]);
        tsum[q] += $exp(fp16_to_real(x[q][i]) - tmax[q]);
      end
      rd[q] = recip_r(tr, d[q]);
    end
    for (int pass = 0; pass < 2; pass++)
      for (int b = 0; b < P * len; b++) begin
        logic [H-1:0][15:0] w;
        w = '0;
        for (int r = 0; r < L; r++) w[r] = x[P * r + b % P][b / P];
        w_q.push_back(w);
        if (pass == 1) begin
          logic [L-1:0][15:0] e;
          real t [L];
          for (int r = 0; r < L; r++) begin
            int q;
            q = P * r + b % P;
            e[r] = fma_r(pwpa_r(te, fma_r(16'hBC00, xmax[q], x[q][b / P])), rd[q], 16'h8000);
            t[r] = $exp(fp16_to_real(x[q][b / P]) - tmax[q]) / tsum[q];
          end
          exp_q.push_back(e); for (int r = 0; r < L; r++) true_q.push_back(t[r]);
        end
      end
    tol = 0.01;
    run(MODE_SOFTMAX, len, c);
    n_softmax++;
    thr = real'(L * P * len) / real'(c);
    $display("softmax len=%0d: %0d cycles, %f elements/cycle", len, c, thr);
    if (len >= 1024 && bubble_pct == 0) begin checks++; if (thr < 3.8) fail("softmax throughput"); end
    thr_sm.push_back(thr);
  endtask

  // ------------------------------------------------------------- layernorm
  task automatic test_layernorm(int len);
    pwpa_tab_t ts;
    logic [15:0] x [NSEQ][];
    logic [15:0] invn, eps, s, q2, mu, var_, r_ [NSEQ], mu_ [NSEQ];
    real tmu [NSEQ], tsd [NSEQ];
    longint c;
    real thr;
    cfg(0, 16'(MODE_LAYERNORM));
    ts = tab_isqrt();
    invn = real_to_fp16(1.0 / len);
    eps  = 16'h1400;                // 2^-10
    for (int q = 0; q < NSEQ; q++) begin
      real a, a2;
      x[q] = new[len];
      s = 16'h0000; q2 = 16'h0000; a = 0.0; a2 = 0.0;
      for (int i = 0; i < len; i++) begin
        x[q][i] = real_to_fp16((($urandom % 10000) / 10000.0) * 4.0 - 2.0 + 0.5 * (q % 3));
        q2 = fma_r(fma_r(x[q][i], invn, 16'h8000), x[q][i], q2);
        s  = fma_r(x[q][i], 16'h3C00, s);
        a += fp16_to_real(x[q][i]); a2 += fp16_to_real(x[q][i]) ** 2;
      end
      mu   = fma_r(s, invn, 16'h8000);
      var_ = fma_r(mu ^ 16'h8000, mu, q2);
      var_ = fma_r(var_, 16'h3C00, eps);
      r_[q] = isqrt_r(ts, var_);
      mu_[q] = mu;
      tmu[q] = a / len;
      tsd[q] = $sqrt(a2 / len - tmu[q] ** 2 + fp16_to_real(eps));
    end
    push_tab(ts);
    for (int pass = 0; pass < 2; pass++)
      for (int b = 0; b < P * len; b++) begin
        logic [H-1:0][15:0] w;
        w = '0;
        for (int r = 0; r < L; r++) w[r] = x[P * r + b % P][b / P];
        w_q.push_back(w);
        if (pass == 1) begin
          logic [L-1:0][15:0] e;
          real t [L];
          for (int r = 0; r < L; r++) begin
            int q;
            q = P * r + b % P;
            e[r] = fma_r(fma_r(16'hBC00, mu_[q], x[q][b / P]), r_[q], 16'h8000);
            t[r] = (fp16_to_real(x[q][b / P]) - tmu[q]) / tsd[q];
          end
          exp_q.push_back(e); for (int r = 0; r < L; r++) true_q.push_back(t[r]);
        end
      end
    cfg(2, invn);
    cfg(3, eps);
    tol = 0.05;
    run(MODE_LAYERNORM, len, c);
    n_ln++;
    thr = real'(L * P * len) / real'(c);
    $display("layernorm len=%0d: %0d cycles, %f elements/cycle", len, c, thr);
    if (len >= 1024 && bubble_pct == 0) begin checks++; if (thr < 3.8) fail("layernorm throughput"); end
    thr_ln.push_back(thr);
  endtask

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; out_ready = 0; max_err = 0.0;
    bubble_pct = 0; block_pct = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) test_act(4, 32 << k);
    for (int k = 0; k < 6; k++) test_softmax(32 << k);
    for (int k = 0; k < 6; k++) test_layernorm(32 << k);
    test_softmax(197);
    test_layernorm(768);
    for (int i = 1; i < 6; i++) begin
      checks++; if (thr_act[i] <= thr_act[i-1]) fail("activation throughput does not grow");
      checks++; if (thr_sm[i]  <= thr_sm[i-1])  fail("softmax throughput does not grow");
      checks++; if (thr_ln[i]  <= thr_ln[i-1])  fail("layernorm throughput does not grow");
    end
    $display("largest deviation from the true function: %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
