// X buffer: holds the stationary X operand, one FP16 value per CE of every
// row (L rows x H columns), written one row vector per cycle. Every CE reads
// its own value continuously while W streams past. Flip-flop storage,
// cleared by reset.
module x_buffer
  import nl_pkg::*;
#(
  parameter int unsigned L = 8,
  parameter int unsigned H = 8,
  localparam int unsigned RW = (L > 1) ? $clog2(L) : 1
) (
  input  logic                    clk_i,
  input  logic                    rst_ni,
  input  logic                    we_i,
  input  logic [RW-1:0]           wrow_i,
  input  fp16_t [H-1:0]           wdata_i,
  output fp16_t [L-1:0][H-1:0]    x_o
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                         x_o <= '0;
    else if (we_i && (32'(wrow_i) < L))  x_o[wrow_i] <= wdata_i;
  end

endmodule
