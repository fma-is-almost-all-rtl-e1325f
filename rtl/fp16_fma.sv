// FP16 fused multiply-add: res = a * b + c with a single round-to-nearest-even.
//
// This is the arithmetic core of a RedMule computing element (CE). The
// product and the addend are both placed exactly into one wide fixed-point
// word whose LSB weighs 2^-48 (the weight of the product of two smallest
// subnormals), added there without any loss, and the exact sum is then
// normalised and rounded once. That makes the unit exact in the IEEE sense,
// including subnormal inputs and outputs, overflow to infinity and the sign
// of an exact zero. NaN results are the canonical quiet NaN 0x7E00.
// Purely combinational; the CE adds the pipeline registers. The exact
// fixed-point construction is a choice of this implementation: the engine
// only requires an FP16 FMA.
module fp16_fma
  import nl_pkg::*;
(
  input  fp16_t a_i,
  input  fp16_t b_i,
  input  fp16_t c_i,
  output fp16_t res_o
);

  localparam int unsigned W = 84;   // exact sum, sign-magnitude magnitude width

  logic        sa, sb, sc, sp;
  logic [4:0]  ea, eb, ec;
  logic [10:0] ma, mb, mc;
  logic        a_inf, b_inf, c_inf, a_nan, b_nan, c_nan, a_zero, b_zero;
  logic [21:0] pm;
  logic [W-1:0] pmag, cmag, mag;
  logic        ssum;
  int unsigned lead, q;
  logic [11:0] rmant;
  logic        guard, sticky;
  logic [W-1:0] stick_mask;
  int          field;

  always_comb begin
    sa = a_i[15]; sb = b_i[15]; sc = c_i[15];
    sp = sa ^ sb;
    ea = (a_i[14:10] == 0) ? 5'd1 : a_i[14:10];
    eb = (b_i[14:10] == 0) ? 5'd1 : b_i[14:10];
    ec = (c_i[14:10] == 0) ? 5'd1 : c_i[14:10];
    ma = {a_i[14:10] != 0, a_i[9:0]};
    mb = {b_i[14:10] != 0, b_i[9:0]};
    mc = {c_i[14:10] != 0, c_i[9:0]};
    a_inf = (a_i[14:10] == 5'h1F) && (a_i[9:0] == 0);
    b_inf = (b_i[14:10] == 5'h1F) && (b_i[9:0] == 0);
    c_inf = (c_i[14:10] == 5'h1F) && (c_i[9:0] == 0);
    a_nan = fp16_is_nan(a_i);
    b_nan = fp16_is_nan(b_i);
    c_nan = fp16_is_nan(c_i);
    a_zero = (a_i[14:0] == 0);
    b_zero = (b_i[14:0] == 0);

    // exact product and addend, both in units of 2^-48
    pm   = ma * mb;
    pmag = W'(pm) << (ea + eb - 2);
    cmag = W'(mc) << (ec + 23);

    if (sp == sc) begin
      mag  = pmag + cmag;
      ssum = sp;
    end else if (pmag >= cmag) begin
      mag  = pmag - cmag;
      ssum = sp;
    end else begin
      mag  = cmag - pmag;
      ssum = sc;
    end

    // leading one
    lead = 0;
    for (int i = 0; i < W; i++) if (mag[i]) lead = i;

    // rounding position: 11 significant bits, but never below 2^-24
    q = (lead >= 34) ? lead - 10 : 24;
    rmant      = 12'(mag >> q);
    guard      = mag[q-1];
    stick_mask = (W'(1) << (q - 1)) - W'(1);
    sticky     = |(mag & stick_mask);
    if (guard && (sticky || rmant[0])) rmant = rmant + 12'd1;

    // encode: value = rmant * 2^(q-48)
    field = int'(q) - 23;
    if (rmant[11]) begin            // rounding carried out to 2048
      field = field + 1;
      rmant = rmant >> 1;
    end

    if (a_nan || b_nan || c_nan ||
        ((a_inf || b_inf) && (a_zero || b_zero)) ||
        ((a_inf || b_inf) && c_inf && (sp != sc))) begin
      res_o = FP16_QNAN;
    end else if (a_inf || b_inf) begin
      res_o = {sp, 5'h1F, 10'h0};
    end else if (c_inf) begin
      res_o = {sc, 5'h1F, 10'h0};
    end else if (mag == 0) begin
      res_o = {(sp == sc) ? sp : 1'b0, 15'h0};
    end else if (field >= 31) begin
      res_o = {ssum, 5'h1F, 10'h0};
    end else if (!rmant[10]) begin  // subnormal
      res_o = {ssum, 5'h0, rmant[9:0]};
    end else begin
      res_o = {ssum, 5'(field), rmant[9:0]};
    end
  end

endmodule
