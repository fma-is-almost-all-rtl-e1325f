// W buffer: broadcasts one W vector (one FP16 per CE column) to all rows and
// skews it for the systolic chain. A partial sum issued into CE0 at cycle t
// reaches CE j at t + j*P, so column j of the vector is delayed by j*P
// cycles. The valid bit is not needed by the columns: the row's own valid
// travels with the partial sum. Delay registers are cleared by reset.
// Column 0 needs no delay, so its 16 output bits are wired straight from the
// input; the delay taps that no column reads are removed by synthesis.
module w_buffer
  import nl_pkg::*;
#(
  parameter int unsigned H = 8,
  parameter int unsigned P = 2
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  fp16_t [H-1:0] w_i,
  output fp16_t [H-1:0] w_o
);

  localparam int unsigned DMAX = (H - 1) * P;
  fp16_t dly_q [H][DMAX+1];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int j = 0; j < H; j++)
        for (int d = 0; d <= DMAX; d++) dly_q[j][d] <= '0;
    end else begin
      for (int j = 0; j < H; j++) begin
        dly_q[j][0] <= w_i[j];
        for (int d = 1; d <= DMAX; d++) dly_q[j][d] <= dly_q[j][d-1];
      end
    end
  end

  always_comb begin
    w_o[0] = w_i[0];
    for (int j = 1; j < H; j++) w_o[j] = dly_q[j][j*P-1];
  end

endmodule
