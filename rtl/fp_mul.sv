// fp_mul: combinational IEEE 754 floating-point multiplier.
//
// y = a * b, rounded to nearest with ties to even. The field widths are
// parameters (defaults: binary64, 11 exponent and 52 fraction bits), so the
// same unit can be built with a shorter mantissa to save multipliers.
//
// How it works: the two significands, with their hidden 1, are multiplied in
// full (2*(MAN_W+1) bits). The product lies in [1,4); if it is 2 or more it is
// shifted one place and the exponent incremented. The bits below the kept
// significand give the guard bit and the sticky bit for rounding; a round-up
// that carries out of the significand bumps the exponent again.
//
// Special values: subnormal inputs count as zero and results below the normal
// range are flushed to a signed zero; overflow gives infinity; inf*0 and any
// NaN input give the quiet NaN. Signs are handled as usual.
//
// Timing: purely combinational, no clock. The enclosing pipeline stage
// registers the result, one operation per stage as in the force pipeline.
// The unit's role and the double-precision format follow the source design;
// the rounding mode and the subnormal flush are this design's choices.
module fp_mul #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic [EXP_W+MAN_W:0] y
);

  localparam int unsigned SW   = MAN_W + 1;            // significand width
  localparam int unsigned PW   = 2 * SW;               // product width
  localparam int unsigned EW   = EXP_W + 2;            // signed working exponent
  localparam int          BIAS = (1 << (EXP_W - 1)) - 1;
  localparam logic [EXP_W-1:0] EMAX = '1;

  logic             sa, sb, sy;
  logic [EXP_W-1:0] ea, eb;
  logic [MAN_W-1:0] ma, mb;
  logic             za, zb, ia, ib, na, nb;
  logic [PW-1:0]    prod;
  logic [SW-1:0]    sig;
  logic             guard, sticky, round_up;
  logic [SW:0]      sig_r;
  logic signed [EW-1:0] ey;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sy = sa ^ sb;
    za = (ea == '0);
    zb = (eb == '0);
    ia = (ea == EMAX) && (ma == '0);
    ib = (eb == EMAX) && (mb == '0);
    na = (ea == EMAX) && (ma != '0);
    nb = (eb == EMAX) && (mb != '0);

    prod = {1'b1, ma} * {1'b1, mb};
    ey   = EW'($signed({2'b00, ea})) + EW'($signed({2'b00, eb})) - EW'(BIAS);

    if (prod[PW-1]) begin
      sig    = prod[PW-1 -: SW];
      guard  = prod[PW-1-SW];
      sticky = |prod[PW-2-SW:0];
      ey     = ey + EW'(1);
    end else begin
      sig    = prod[PW-2 -: SW];
      guard  = prod[PW-2-SW];
      sticky = |prod[PW-3-SW:0];
    end

    round_up = guard && (sticky || sig[0]);
    sig_r    = {1'b0, sig} + (SW+1)'(round_up);
    if (sig_r[SW]) begin
      sig_r = sig_r >> 1;
      ey    = ey + EW'(1);
    end

    if (na || nb || (ia && zb) || (ib && za)) begin
      y = {1'b0, EMAX, 1'b1, {(MAN_W-1){1'b0}}};
    end else if (ia || ib) begin
      y = {sy, EMAX, {MAN_W{1'b0}}};
    end else if (za || zb || ey <= 0) begin
      y = {sy, {(EXP_W+MAN_W){1'b0}}};
    end else if (ey >= EW'($signed({2'b00, EMAX}))) begin
      y = {sy, EMAX, {MAN_W{1'b0}}};
    end else begin
      y = {sy, ey[EXP_W-1:0], sig_r[MAN_W-1:0]};
    end
  end

endmodule
