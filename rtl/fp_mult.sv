// fp_mult: custom-precision floating-point multiplier, z = a * b.
//
// Operands and result use the format {sign, exponent[EXP_W], mantissa[MAN_W]} with
// bias 2^(EXP_W-1)-1, as in IEEE-754; both field widths are parameters, so one
// source serves every (w,t) format of the precision sweep. The significands
// (hidden one included) are multiplied exactly, the product is normalised by at
// most one place and rounded to nearest, ties to even, which is the rounding mode
// all arithmetic units of the predistorter use.
//
// Special values: exponent all ones encodes infinity (mantissa 0) or NaN. This
// design's own choices where IEEE-754 leaves room or where the full standard would
// cost area: subnormal inputs are read as zero, results below the normal range are
// flushed to a zero of the right sign (the check is made after rounding), results
// above it become infinity, and every NaN result is the quiet NaN with only the top
// mantissa bit set.
//
// Purely combinational; the instantiating module decides where registers go.
module fp_mult #(
  parameter int unsigned EXP_W = dpd_pkg::EXP_W_DEFAULT,
  parameter int unsigned MAN_W = dpd_pkg::MAN_W_DEFAULT,
  localparam int unsigned N    = 1 + EXP_W + MAN_W
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] z
);

  localparam int unsigned PW   = 2 * MAN_W + 2;          // product width
  localparam int unsigned EW   = EXP_W + 2;              // signed exponent arithmetic
  localparam logic [EW-1:0] BIAS   = EW'((1 << (EXP_W - 1)) - 1);
  localparam logic [EW-1:0] EMAX   = EW'((1 << EXP_W) - 1);

  logic               sa, sb, sz;
  logic [EXP_W-1:0]   ea, eb;
  logic [MAN_W-1:0]   ma, mb;
  logic               a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  logic [PW-1:0]      prod, norm;
  logic [MAN_W:0]     mant_r;     // rounded mantissa with carry-out bit
  logic               guard, sticky, inc;
  logic signed [EW-1:0] e_prod, e_fin;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sz = sa ^ sb;

    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf  = (ea == '1) && (ma == '0);
    b_inf  = (eb == '1) && (mb == '0);
    a_nan  = (ea == '1) && (ma != '0);
    b_nan  = (eb == '1) && (mb != '0);

    // Exact significand product in [1,4), leading one at PW-1 or PW-2.
    prod   = PW'({1'b1, ma}) * PW'({1'b1, mb});
    e_prod = $signed(EW'(ea)) + $signed(EW'(eb)) - $signed(BIAS);
    if (prod[PW-1]) begin
      norm  = prod;
      e_prod = e_prod + 1;
    end else begin
      norm  = prod << 1;
    end

    // norm[PW-1] is the hidden one; next MAN_W bits are the mantissa.
    guard  = norm[PW-2-MAN_W];
    sticky = |norm[PW-3-MAN_W:0];
    inc    = guard & (sticky | norm[PW-1-MAN_W]);
    mant_r = {1'b0, norm[PW-2 -: MAN_W]} + (MAN_W+1)'(inc);
    e_fin  = e_prod + (mant_r[MAN_W] ? 1 : 0);

    if (a_nan || b_nan || (a_inf && b_zero) || (a_zero && b_inf)) begin
      z = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
    end else if (a_inf || b_inf) begin
      z = {sz, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    end else if (a_zero || b_zero) begin
      z = {sz, {(N-1){1'b0}}};
    end else if (e_fin >= $signed(EMAX)) begin
      z = {sz, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    end else if (e_fin <= 0) begin
      z = {sz, {(N-1){1'b0}}};
    end else begin
      z = {sz, e_fin[EXP_W-1:0], mant_r[MAN_W-1:0]};
    end
  end

endmodule
