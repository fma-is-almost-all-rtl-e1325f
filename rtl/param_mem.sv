// ParamMem: the shared parameter memory of the nonlinear extension. It holds
// the 7 PWPA breakpoints, the 4 coefficients (a, b, c, d) of each of the 8
// partitions and one shift value (x_max for softmax) per row and interleave
// slot, and broadcasts all of them to every CE row. Breakpoints and
// coefficients are common to all rows; shift values are wired per row.
// Written one 16-bit word per cycle through a simple write port (word layout
// in nl_pkg: PM_BP_BASE, PM_COEF_BASE + 4*partition + stage,
// PM_SHIFT_BASE + P*row + slot); it is reloaded between the phases of an
// operation. Implemented as flip-flops so that every word can be read at
// once. Reset clears all words.
module param_mem
  import nl_pkg::*;
#(
  parameter int unsigned L = 8,   // CE rows
  parameter int unsigned P = 2,   // interleave slots per row (pipeline depth)
  localparam int unsigned NWORDS = PM_SHIFT_BASE + L * P,
  localparam int unsigned AW = $clog2(NWORDS)
) (
  input  logic                                  clk_i,
  input  logic                                  rst_ni,
  input  logic                                  we_i,
  input  logic [AW-1:0]                         waddr_i,
  input  fp16_t                                 wdata_i,
  output fp16_t [PW_NBP-1:0]                    bp_o,
  output fp16_t [PW_NCOEF-1:0][PW_NPART-1:0]    coef_o,   // [stage][partition]
  output fp16_t [L-1:0][P-1:0]                  shift_o
);

  fp16_t mem_q [NWORDS];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < NWORDS; i++) mem_q[i] <= '0;
    end else if (we_i && (32'(waddr_i) < NWORDS)) begin
      mem_q[waddr_i] <= wdata_i;
    end
  end

  always_comb begin
    for (int i = 0; i < PW_NBP; i++) bp_o[i] = mem_q[PM_BP_BASE + i];
    for (int s = 0; s < PW_NCOEF; s++)
      for (int p = 0; p < PW_NPART; p++)
        coef_o[s][p] = mem_q[PM_COEF_BASE + PW_NCOEF * p + s];
    for (int r = 0; r < L; r++)
      for (int s = 0; s < P; s++)
        shift_o[r][s] = mem_q[PM_SHIFT_BASE + P * r + s];
  end

endmodule
