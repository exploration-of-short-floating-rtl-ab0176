// fp_addsub: custom-precision floating-point adder/subtractor, z = a + b (sub = 0)
// or z = a - b (sub = 1).
//
// Same number format and special-value rules as fp_mult: {sign, exponent[EXP_W],
// mantissa[MAN_W]}, IEEE-754 bias, round to nearest with ties to even. The
// operand of larger magnitude is kept, the other is shifted right to align it while
// guard, round and sticky bits collect what falls off; the aligned significands are
// added or subtracted, the result is normalised (one place right after a carry, or
// left by the leading-zero count after cancellation) and rounded once.
//
// This design's own choices: subnormal inputs count as zero, results below the
// normal range flush to a zero of the result's sign, overflow gives infinity, an
// exact zero from cancellation is +0, and a NaN result is the quiet NaN with only
// the top mantissa bit set (infinity minus infinity included).
//
// Purely combinational.
module fp_addsub #(
  parameter int unsigned EXP_W = dpd_pkg::EXP_W_DEFAULT,
  parameter int unsigned MAN_W = dpd_pkg::MAN_W_DEFAULT,
  localparam int unsigned N    = 1 + EXP_W + MAN_W
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  output logic [N-1:0] z
);

  localparam int unsigned SW = MAN_W + 4;       // hidden one, mantissa, guard, round, sticky
  localparam int unsigned EW = EXP_W + 2;
  localparam logic [EW-1:0] EMAX = EW'((1 << EXP_W) - 1);

  logic               sa, sb;
  logic [EXP_W-1:0]   ea, eb;
  logic [MAN_W-1:0]   ma, mb;
  logic               a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  logic               swap, s_big, s_small, eff_sub;
  logic [EXP_W-1:0]   e_big, e_small;
  logic [SW-1:0]      sig_big, sig_small, aligned;
  logic [EXP_W-1:0]   shamt;
  logic               lost;
  logic [SW:0]        sum, norm;
  int unsigned        lz;
  logic               found;
  logic               guard, sticky, inc;
  logic [MAN_W:0]     mant_r;
  logic signed [EW-1:0] e_norm, e_fin;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sb = sb ^ sub;

    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf  = (ea == '1) && (ma == '0);
    b_inf  = (eb == '1) && (mb == '0);
    a_nan  = (ea == '1) && (ma != '0);
    b_nan  = (eb == '1) && (mb != '0);

    // Order the operands by magnitude.
    swap    = {eb, mb} > {ea, ma};
    s_big   = swap ? sb : sa;
    s_small = swap ? sa : sb;
    e_big   = swap ? eb : ea;
    e_small = swap ? ea : eb;
    sig_big   = {1'b1, (swap ? mb : ma), 3'b000};
    sig_small = {1'b1, (swap ? ma : mb), 3'b000};
    eff_sub = s_big ^ s_small;

    // Align the smaller operand; bits shifted out fold into the sticky bit.
    shamt = e_big - e_small;
    if (32'(shamt) >= SW) begin
      aligned = '0;
      lost    = 1'b1;
    end else begin
      aligned = sig_small >> shamt;
      lost    = (sig_small & ~({SW{1'b1}} << shamt)) != '0;
    end
    aligned[0] = aligned[0] | lost;

    sum = eff_sub ? ({1'b0, sig_big} - {1'b0, aligned})
                  : ({1'b0, sig_big} + {1'b0, aligned});

    // Normalise so that the hidden one sits at bit SW-1.
    e_norm = $signed(EW'(e_big));
    lz = 0;
    found = 1'b0;
    if (sum[SW]) begin
      norm   = sum >> 1;
      norm[0] = norm[0] | sum[0];
      e_norm = e_norm + 1;
    end else begin
      for (int p = SW - 1; p >= 0; p--) begin
        if (sum[p] && !found) begin
          lz    = SW - 1 - p;
          found = 1'b1;
        end
      end
      norm   = sum << lz;
      e_norm = e_norm - $signed(EW'(lz));
    end

    guard  = norm[2];
    sticky = norm[1] | norm[0];
    inc    = guard & (sticky | norm[3]);
    mant_r = {1'b0, norm[SW-2:3]} + (MAN_W+1)'(inc);
    e_fin  = e_norm + (mant_r[MAN_W] ? 1 : 0);

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      z = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
    end else if (a_inf) begin
      z = {sa, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    end else if (b_inf) begin
      z = {sb, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    end else if (a_zero && b_zero) begin
      z = {sa & sb, {(N-1){1'b0}}};
    end else if (a_zero) begin
      z = {sb, eb, mb};
    end else if (b_zero) begin
      z = {sa, ea, ma};
    end else if (sum == '0) begin
      z = '0;
    end else if (e_fin >= $signed(EMAX)) begin
      z = {s_big, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    end else if (e_fin <= 0) begin
      z = {s_big, {(N-1){1'b0}}};
    end else begin
      z = {s_big, e_fin[EXP_W-1:0], mant_r[MAN_W-1:0]};
    end
  end

endmodule
