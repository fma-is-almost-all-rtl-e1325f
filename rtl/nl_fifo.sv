// Stream FIFO with valid/ready handshakes on both sides, used for the
// nonlinear input buffer, the nonlinear output buffer and the Z output
// buffer. A beat moves when valid and ready are both high. Circular buffer
// of DEPTH entries (DEPTH a power of two) with a fill counter; data appear
// at the output the cycle after they are written (no fall-through).
module nl_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             in_valid_i,
  output logic             in_ready_o,
  input  logic [WIDTH-1:0] in_data_i,
  output logic             out_valid_o,
  input  logic             out_ready_i,
  output logic [WIDTH-1:0] out_data_o,
  output logic [AW:0]      count_o
);

  logic [WIDTH-1:0] mem_q [DEPTH];
  logic [AW-1:0]    wptr_q, rptr_q;
  logic             push, pop;

  assign in_ready_o  = (count_o < (AW+1)'(DEPTH));
  assign out_valid_o = (count_o != '0);
  assign out_data_o  = mem_q[rptr_q];
  assign push = in_valid_i && in_ready_o;
  assign pop  = out_valid_o && out_ready_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wptr_q  <= '0;
      rptr_q  <= '0;
      count_o <= '0;
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else begin
      if (push) begin
        mem_q[wptr_q] <= in_data_i;
        wptr_q <= wptr_q + 1'b1;
      end
      if (pop) rptr_q <= rptr_q + 1'b1;
      count_o <= count_o + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assert property (@(posedge clk_i) disable iff (!rst_ni) count_o <= (AW+1)'(DEPTH));

endmodule
