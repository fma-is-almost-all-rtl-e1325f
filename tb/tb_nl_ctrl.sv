// Testbench for nl_ctrl on its own. The rows are replaced by an H*P-cycle
// delay of the issued, output-producing beats. For each mode it records the
// ParamMem load windows (words accepted per window), X-buffer writes and the
// sequence of issued row operations with their slot and first flags, and
// compares them with the documented phase lists. It also holds the output
// buffer almost full to check that credit counting blocks issue, and checks
// busy/done.
module tb_nl_ctrl;
  import nl_pkg::*;
  localparam int L = 8, H = 8, P = 2, D = 32, LAT = H * P;

  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [2:0] cfg_addr; logic [15:0] cfg_wdata;
  logic busy, done;
  mode_e mode; logic [15:0] inv_n, eps;
  logic param_valid, param_ready, pm_we; logic [5:0] pm_waddr;
  logic xin_valid, xin_ready, xb_we; logic [2:0] xb_row;
  logic w_valid, y_valid, wy_ready, ibuf_valid, ibuf_pop;
  logic [5:0] zcount, ocount;
  logic row_valid;
  row_op_e op; logic issue, slot, first;
  int checks = 0, failures = 0;

  nl_ctrl #(.L(L), .H(H), .P(P), .OBUF_DEPTH(D)) dut (
    .clk_i(clk), .rst_ni(rst_n), .cfg_we_i(cfg_we), .cfg_addr_i(cfg_addr), .cfg_wdata_i(cfg_wdata),
    .busy_o(busy), .done_o(done), .mode_o(mode), .inv_n_o(inv_n), .eps_o(eps),
    .param_valid_i(param_valid), .param_ready_o(param_ready), .pm_we_o(pm_we), .pm_waddr_o(pm_waddr),
    .xin_valid_i(xin_valid), .xin_ready_o(xin_ready), .xb_we_o(xb_we), .xb_row_o(xb_row),
    .w_valid_i(w_valid), .y_valid_i(y_valid), .wy_ready_o(wy_ready),
    .ibuf_valid_i(ibuf_valid), .ibuf_pop_o(ibuf_pop),
    .zbuf_count_i(zcount), .obuf_count_i(ocount), .row_valid_i(row_valid),
    .op_o(op), .issue_o(issue), .slot_o(slot), .first_o(first));

  always #5 clk = ~clk;

  // row model
  logic dly [LAT];
  assign row_valid = dly[LAT-1];
  always @(posedge clk) begin
    dly[0] <= issue && (op inside {ROW_GEMM, ROW_ACT, ROW_SM_OUT, ROW_LN_OUT});
    for (int i = 1; i < LAT; i++) dly[i] <= dly[i-1];
  end

  // recorders
  int      loads [$];          // words per ParamMem load window
  int      cur_load = 0;
  row_op_e ops [$];
  int      nx = 0, first_bad = 0, slot_bad = 0, addr_bad = 0, issue_idx = 0, max_occ = 0;
  row_op_e last_op;
  int      occ = 0;
  int      hold = 0;           // output buffer occupancy forced by the test

  always @(posedge clk) if (rst_n) begin
    if (pm_we) begin
      if (int'(pm_waddr) != cur_load) addr_bad++;
      cur_load++;
    end
    if (!param_ready && cur_load != 0) begin loads.push_back(cur_load); cur_load = 0; end
    if (xb_we) begin if (int'(xb_row) != nx) addr_bad++; nx++; end
    if (issue) begin
      if (ops.size() == 0 || op != last_op) begin issue_idx = 0; end
      ops.push_back(op);
      last_op = op;
      if (op != ROW_GEMM) begin
        if (slot != 1'(issue_idx % P)) slot_bad++;
        if (first != (issue_idx < P)) first_bad++;
      end
      issue_idx++;
    end
    occ = occ + (issue && (op inside {ROW_GEMM, ROW_ACT, ROW_SM_OUT, ROW_LN_OUT}) ? 1 : 0);
    if (row_valid) occ--;
    if (occ + hold > max_occ) max_occ = occ + hold;
  end
  assign ocount = 6'(hold);
  assign zcount = 6'(hold);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    param_valid <= ($urandom % 4) != 0;
    xin_valid   <= ($urandom % 4) != 0;
    w_valid     <= ($urandom % 4) != 0;
    y_valid     <= 1'b1;
    ibuf_valid  <= ($urandom % 4) != 0;
  end

  task automatic cfg(int a, logic [15:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 3'(a); cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: got %0d want %0d", what, got, want); end
  endtask

  // run-length check of the issued op sequence
  task automatic expect_ops(row_op_e want_op [], int want_n []);
    int k;
    k = 0;
    for (int i = 0; i < want_op.size(); i++)
      for (int n = 0; n < want_n[i]; n++) begin
        checks++;
        if (k >= ops.size() || ops[k] != want_op[i]) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d: want %s", k, want_op[i].name());
        end
        k++;
      end
    expect_eq("issued beats", ops.size(), k);
  endtask

  task automatic run(mode_e m, int len);
    loads.delete(); ops.delete(); nx = 0; first_bad = 0; slot_bad = 0; addr_bad = 0;
    cfg(0, 16'(m)); cfg(1, 16'(len));
    cfg(4, 16'd1);
    @(negedge clk);
    checks++; if (!busy) begin failures++; $display("FAIL not busy after start"); end
    wait (done);
    repeat (2) @(negedge clk);
    expect_eq("slot pattern errors", slot_bad, 0);
    expect_eq("first flag errors", first_bad, 0);
    expect_eq("address errors", addr_bad, 0);
  endtask

  initial begin
    int n;
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    for (int i = 0; i < LAT; i++) dly[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 20;

    run(MODE_SOFTMAX, n);
    expect_eq("softmax load windows", loads.size(), 3);
    if (loads.size() == 3) begin
      expect_eq("softmax load 0", loads[0], 39 + L * P);
      expect_eq("softmax load 1", loads[1], 39);
      expect_eq("softmax load 2", loads[2], 39);
    end
    expect_ops('{ROW_SM_SUM, ROW_RECIP, ROW_SM_OUT}, '{P * n, P, P * n});

    run(MODE_LAYERNORM, n);
    expect_eq("layernorm load windows", loads.size(), 1);
    if (loads.size() == 1) expect_eq("layernorm load 0", loads[0], 39);
    expect_ops('{ROW_LN_STAT, ROW_LN_MU, ROW_LN_VAR, ROW_LN_EPS, ROW_ISQRT, ROW_LN_OUT},
               '{P * n, P, P, P, P, P * n});

    run(MODE_ACT, n);
    expect_eq("activation load windows", loads.size(), 1);
    expect_ops('{ROW_ACT}, '{P * n});

    run(MODE_GEMM, n);
    expect_eq("X rows written", nx, L);
    expect_ops('{ROW_GEMM}, '{n});

    // credit counting: with the output buffer holding D-4 beats, at most 4
    // beats may be in flight
    hold = D - 4; max_occ = 0;
    run(MODE_ACT, n);
    expect_ops('{ROW_ACT}, '{P * n});
    checks++;
    if (max_occ > D) begin failures++; $display("FAIL occupancy %0d exceeds buffer", max_occ); end
    expect_eq("occupancy reaches the limit", max_occ, D);
    hold = 0;

    // register writes are ignored while busy
    cfg(1, 16'd4); cfg(0, 16'(MODE_SOFTMAX));
    cfg(4, 16'd1);
    cfg(1, 16'd100);
    wait (done);
    expect_eq("LEN held while busy", int'(dut.len_q), 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
