// inv_sqrt_unit: second section of the force pipeline, four stages.
//
// Computes y ~= 1/sqrt(r3) with the "fast inverse square root": a first guess
// made by integer arithmetic on the bit pattern,
//     y0 = MAGIC - (r3 >> 1)          (MAGIC = 0x5FE6EB50C7B537A9 for binary64)
// followed by one Newton-Raphson step
//     y  = y0 * (1.5 - (0.5*r3) * y0 * y0).
// The step is evaluated here as 1.5*y0 - (y0*y0)*(0.5*r3*y0), the same
// expression regrouped so that it fits four one-operation-deep stages:
//   1  y0 = MAGIC - (r3 >> 1),  x2 = 0.5 * r3          (integer subtract, multiplier)
//   2  p = y0*y0,  q = x2*y0,  h = 1.5*y0               (three multipliers)
//   3  s = p*q                                          (multiplier)
//   4  y = h - s                                        (adder)
// The relative error of the result is below about 0.2 % for any positive
// normal input. dx_in/dy_in are carried through unchanged so that they meet
// the result in the last pipeline stage.
//
// Interface and timing: en_out follows en_in by exactly four clocks; a new
// input may be taken every clock. rst_n (synchronous, active low) clears the
// valid bits only.
//
// The algorithm, the magic constant and the four-stage count follow the source
// design; the regrouping of the Newton step across the stages is this design's
// choice.
module inv_sqrt_unit
  import nbody_pkg::*;
#(
  parameter int unsigned                 EXP_W = 11,
  parameter int unsigned                 MAN_W = 52,
  parameter logic [EXP_W+MAN_W:0]        MAGIC = FISR_MAGIC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en_in,
  input  logic [EXP_W+MAN_W:0] r3,
  input  logic [EXP_W+MAN_W:0] dx_in,
  input  logic [EXP_W+MAN_W:0] dy_in,
  output logic                 en_out,
  output logic [EXP_W+MAN_W:0] y,
  output logic [EXP_W+MAN_W:0] dx_out,
  output logic [EXP_W+MAN_W:0] dy_out
);

  localparam int unsigned W = EXP_W + MAN_W + 1;
  localparam int unsigned N = ISQRT_STAGES;   // 4
  localparam int          BIAS = (1 << (EXP_W - 1)) - 1;
  // 0.5 and 1.5 in the configured format
  localparam logic [W-1:0] C_HALF       = {1'b0, EXP_W'(BIAS - 1), {MAN_W{1'b0}}};
  localparam logic [W-1:0] C_THREEHALFS = {1'b0, EXP_W'(BIAS), 1'b1, {(MAN_W-1){1'b0}}};

  logic [N-1:0] en_q;
  logic [W-1:0] dx_q [N];
  logic [W-1:0] dy_q [N];
  logic [W-1:0] y0_q, x2_q, p_q, q_q, h_q, h3_q, s_q, y_q;
  logic [W-1:0] y0_c, x2_c, p_c, q_c, h_c, s_c, y_c;

  assign y0_c = MAGIC - (r3 >> 1);

  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_half  (.a(r3),   .b(C_HALF),       .y(x2_c));
  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_ysq   (.a(y0_q), .b(y0_q),         .y(p_c));
  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_x2y   (.a(x2_q), .b(y0_q),         .y(q_c));
  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_h     (.a(y0_q), .b(C_THREEHALFS), .y(h_c));
  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_pq    (.a(p_q),  .b(q_q),          .y(s_c));
  fp_add #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_newt  (.a(h3_q), .b(s_q), .sub(1'b1), .y(y_c));

  always_ff @(posedge clk) begin
    if (!rst_n) en_q <= '0;
    else        en_q <= {en_q[N-2:0], en_in};
  end

  always_ff @(posedge clk) begin
    dx_q[0] <= dx_in;
    dy_q[0] <= dy_in;
    for (int k = 1; k < N; k++) begin
      dx_q[k] <= dx_q[k-1];
      dy_q[k] <= dy_q[k-1];
    end
    y0_q <= y0_c;    // stage 1
    x2_q <= x2_c;
    p_q  <= p_c;     // stage 2
    q_q  <= q_c;
    h_q  <= h_c;
    s_q  <= s_c;     // stage 3
    h3_q <= h_q;
    y_q  <= y_c;     // stage 4
  end

  assign en_out = en_q[N-1];
  assign y      = y_q;
  assign dx_out = dx_q[N-1];
  assign dy_out = dy_q[N-1];

endmodule
