// nbody_ref_pkg: reference model of the force pipeline for the testbenches.
//
// Each function repeats the pipeline's arithmetic with the simulator's own
// IEEE 754 double operations, in the same order as the hardware, so that a
// correct design matches bit for bit. force_exact() gives the mathematically
// exact force (true square root) for accuracy checks.
package nbody_ref_pkg;

  localparam logic [63:0] MAGIC = 64'h5FE6_EB50_C7B5_37A9;

  typedef struct {
    logic [63:0] dx, dy, r3, inv, fx, fy;
  } ref_t;

  function automatic logic [63:0] fisr(input logic [63:0] r3);
    logic [63:0] y0;
    real x2, p, q, h, s;
    y0 = MAGIC - (r3 >> 1);
    x2 = $bitstoreal(r3) * 0.5;
    p  = $bitstoreal(y0) * $bitstoreal(y0);
    q  = x2 * $bitstoreal(y0);
    h  = $bitstoreal(y0) * 1.5;
    s  = p * q;
    return $realtobits(h - s);
  endfunction

  function automatic ref_t force_ref(input logic [63:0] xa, input logic [63:0] xb,
                                     input logic [63:0] ya, input logic [63:0] yb);
    ref_t o;
    real dx, dy, r, r2, r3;
    dx = $bitstoreal(xb) - $bitstoreal(xa);
    dy = $bitstoreal(yb) - $bitstoreal(ya);
    r  = dx * dx + dy * dy;
    r2 = r * r;
    r3 = r2 * r;
    o.dx  = $realtobits(dx);
    o.dy  = $realtobits(dy);
    o.r3  = $realtobits(r3);
    o.inv = fisr(o.r3);
    o.fx  = $realtobits($bitstoreal(o.inv) * dx);
    o.fy  = $realtobits($bitstoreal(o.inv) * dy);
    return o;
  endfunction

  // Random coordinate in +-[2^-4, 2^12), any sign, full mantissa.
  function automatic logic [63:0] rnd_pos();
    logic [63:0] v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(1023 - 4 + ($urandom % 16));
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  function automatic real rel_err(input real got, input real want);
    real d;
    d = got - want;
    if (d < 0.0) d = -d;
    if (want < 0.0) want = -want;
    return (want == 0.0) ? d : d / want;
  endfunction

endpackage
