// fp_add: combinational IEEE 754 floating-point adder / subtractor.
//
// y = a + b (sub = 0) or y = a - b (sub = 1), rounded to nearest with ties to
// even. Field widths are parameters (defaults: binary64, 11 exponent and 52
// fraction bits).
//
// How it works: the operand of larger magnitude is taken as the base. The
// other significand is shifted right by the exponent difference into a field
// with three extra low bits (guard, round, sticky; every bit shifted past the
// sticky position is ORed into it). The two are added, or subtracted when the
// effective signs differ. A carry out shifts the sum right by one; a
// cancellation is normalised by a leading-zero count and left shift. The result
// is then rounded on the guard bit and the OR of the bits below it.
//
// Special values: subnormal inputs count as zero, results below the normal
// range are flushed to a signed zero, overflow gives infinity, inf - inf and
// NaN inputs give the quiet NaN. An exact zero difference is +0.
//
// Timing: purely combinational; the enclosing pipeline stage registers the
// result. The double-precision format follows the source design; the adder's
// structure, rounding mode and subnormal flush are this design's choices.
module fp_add #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  input  logic                 sub,
  output logic [EXP_W+MAN_W:0] y
);

  localparam int unsigned SW = MAN_W + 1;   // significand with hidden bit
  localparam int unsigned XW = SW + 3;      // plus guard, round, sticky
  localparam int unsigned AW = XW + 1;      // plus carry
  localparam int unsigned EW = EXP_W + 2;   // signed working exponent
  localparam logic [EXP_W-1:0] EMAX = '1;

  logic             sa, sb, sx, sn;
  logic [EXP_W-1:0] ea, eb, ex, en;
  logic [MAN_W-1:0] ma, mb, mx, mn;
  logic             za, zb, ia, ib, nan_in;
  logic             swap, eff_sub;
  logic [EXP_W-1:0] d;
  logic [XW-1:0]    sig_x, sig_n, sig_n_sh, sh_mask;
  logic [AW-1:0]    s;
  logic [$clog2(AW+1)-1:0] lz;
  logic             lz_found;
  logic signed [EW-1:0] ey;
  logic             guard, sticky, round_up;
  logic [SW:0]      sig_r;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sb = sb ^ sub;                       // subtraction = add the negated b
    za = (ea == '0);
    zb = (eb == '0);
    ia = (ea == EMAX) && (ma == '0);
    ib = (eb == EMAX) && (mb == '0);
    nan_in = ((ea == EMAX) && (ma != '0)) || ((eb == EMAX) && (mb != '0));

    // Order the operands by magnitude: x is the larger one.
    swap = {eb, mb} > {ea, ma};
    if (swap) begin
      {sx, ex, mx} = {sb, eb, mb};
      {sn, en, mn} = {sa, ea, ma};
    end else begin
      {sx, ex, mx} = {sa, ea, ma};
      {sn, en, mn} = {sb, eb, mb};
    end
    eff_sub = sx ^ sn;

    // Align the smaller significand.
    d       = ex - en;
    sh_mask = '0;
    sig_x   = {1'b1, mx, 3'b000};
    sig_n   = {1'b1, mn, 3'b000};
    if (d >= EXP_W'(XW)) begin
      sig_n_sh = XW'(1);                 // everything lands in the sticky bit
    end else begin
      sh_mask  = ~({XW{1'b1}} << d);
      sig_n_sh = (sig_n >> d) | XW'(|(sig_n & sh_mask));
    end
    if (za || zb) sig_n_sh = '0;         // only used when neither is zero

    s  = eff_sub ? ({1'b0, sig_x} - {1'b0, sig_n_sh})
                 : ({1'b0, sig_x} + {1'b0, sig_n_sh});
    ey = EW'($signed({2'b00, ex}));

    // Normalise.
    lz = '0;
    lz_found = 1'b0;
    if (s[AW-1]) begin
      s  = (s >> 1) | AW'(s[0]);
      ey = ey + EW'(1);
    end else begin
      for (int i = XW - 1; i >= 0; i--) begin
        if (!lz_found) begin
          if (s[i]) lz_found = 1'b1;
          else      lz = lz + 1'b1;
        end
      end
      s  = s << lz;
      ey = ey - EW'(lz);
    end

    // Round to nearest, ties to even.
    guard    = s[2];
    sticky   = s[1] | s[0];
    round_up = guard && (sticky || s[3]);
    sig_r    = {1'b0, s[XW-1:3]} + (SW+1)'(round_up);
    if (sig_r[SW]) begin
      sig_r = sig_r >> 1;
      ey    = ey + EW'(1);
    end

    // Results, special cases first.
    if (nan_in || (ia && ib && (sa != sb))) begin
      y = {1'b0, EMAX, 1'b1, {(MAN_W-1){1'b0}}};
    end else if (ia) begin
      y = {sa, EMAX, {MAN_W{1'b0}}};
    end else if (ib) begin
      y = {sb, EMAX, {MAN_W{1'b0}}};
    end else if (za && zb) begin
      y = {sa & sb, {(EXP_W+MAN_W){1'b0}}};
    end else if (zb) begin
      y = {sa, ea, ma};
    end else if (za) begin
      y = {sb, eb, mb};
    end else if (s == '0) begin
      y = '0;
    end else if (ey <= 0) begin
      y = {sx, {(EXP_W+MAN_W){1'b0}}};
    end else if (ey >= EW'($signed({2'b00, EMAX}))) begin
      y = {sx, EMAX, {MAN_W{1'b0}}};
    end else begin
      y = {sx, ey[EXP_W-1:0], sig_r[MAN_W-1:0]};
    end
  end

endmodule
