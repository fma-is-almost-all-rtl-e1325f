// Shared types and constants of the FMA-centric nonlinear extension of the
// RedMule GEMM engine.
//
// All arithmetic is IEEE-754 binary16 (FP16), as in the base engine. The
// piecewise polynomial approximation (PWPA) uses degree 3 and 8 partitions,
// the configuration the design is built around; the 7 inner breakpoints and
// 4 coefficients per partition live in the parameter memory (ParamMem) with
// the word layout given by the PM_* constants below. The layout, the mode
// encodings and the row operation codes are choices of this implementation.
package nl_pkg;

  typedef logic [15:0] fp16_t;

  localparam fp16_t FP16_ZERO    = 16'h0000;
  localparam fp16_t FP16_ONE     = 16'h3C00;
  localparam fp16_t FP16_NEG_ONE = 16'hBC00;
  localparam fp16_t FP16_QNAN    = 16'h7E00;

  // PWPA configuration: degree-3 polynomial, 8 partitions.
  localparam int unsigned PW_DEGREE = 3;
  localparam int unsigned PW_NPART  = 8;
  localparam int unsigned PW_IDW    = 3;               // partition id width
  localparam int unsigned PW_NBP    = PW_NPART - 1;    // inner breakpoints
  localparam int unsigned PW_NCOEF  = PW_DEGREE + 1;   // a, b, c, d

  // ParamMem word layout: breakpoints, then coefficients (partition-major,
  // a b c d per partition), then one shift value per (row, interleave slot).
  localparam int unsigned PM_BP_BASE   = 0;
  localparam int unsigned PM_COEF_BASE = PW_NBP;                          // 7
  localparam int unsigned PM_SHIFT_BASE = PW_NBP + PW_NPART * PW_NCOEF;   // 39

  // Engine operating modes (memory-mapped MODE register).
  typedef enum logic [1:0] {
    MODE_GEMM      = 2'd0,
    MODE_ACT       = 2'd1,
    MODE_SOFTMAX   = 2'd2,
    MODE_LAYERNORM = 2'd3
  } mode_e;

  // What a CE row does with the beats currently flowing through it.
  typedef enum logic [3:0] {
    ROW_GEMM    = 4'd0,  // systolic dot product chain
    ROW_ACT     = 4'd1,  // shift by 0, PWPA, bypass CE5..CE7
    ROW_SM_SUM  = 4'd2,  // softmax pass 1: shift, PWPA exp, accumulate in CE5
    ROW_SM_OUT  = 4'd3,  // softmax pass 2: shift, PWPA exp, scale by 1/D in CE5
    ROW_RECIP   = 4'd4,  // reciprocal of the accumulated denominator
    ROW_LN_STAT = 4'd5,  // layernorm pass 1: sum and scaled sum of squares
    ROW_LN_MU   = 4'd6,  // mu    = s * (1/N)            (CE0)
    ROW_LN_VAR  = 4'd7,  // var   = q - mu * mu          (CE0)
    ROW_LN_EPS  = 4'd8,  // var   = var + eps            (CE0)
    ROW_ISQRT   = 4'd9,  // inverse square root of var
    ROW_LN_OUT  = 4'd10  // layernorm pass 2: (x - mu) * r in CE0 and CE5
  } row_op_e;

  function automatic logic fp16_is_nan(fp16_t a);
    return (a[14:10] == 5'h1F) && (a[9:0] != '0);
  endfunction

  // a < b on FP16 values (NaN-free inputs assumed; -0 equals +0).
  function automatic logic fp16_lt(fp16_t a, fp16_t b);
    logic a_zero, b_zero;
    a_zero = (a[14:0] == '0);
    b_zero = (b[14:0] == '0);
    if (a_zero && b_zero)      return 1'b0;
    if (a[15] != b[15])        return a[15];
    if (a[15] == 1'b0)         return a[14:0] < b[14:0];
    return a[14:0] > b[14:0];
  endfunction

endpackage
