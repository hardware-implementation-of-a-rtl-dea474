// r3_unit: first section of the force pipeline, five stages.
//
// Computes r^3 = ((xj - xi)^2 + (yj - yi)^2)^3, the cube of the squared
// distance between body i (rx_a, ry_a) and body j (rx_b, ry_b). Its inverse
// square root, taken in the next section, is 1/|r_ij|^3.
//
// Stages (one floating-point operation per unit, each stage registered):
//   1  dx = rx_b - rx_a,  dy = ry_b - ry_a      (two adders)
//   2  dx2 = dx*dx,       dy2 = dy*dy           (two multipliers)
//   3  r  = dx2 + dy2                            (adder)
//   4  r2 = r*r                                  (multiplier)
//   5  r3 = r2*r                                 (multiplier)
// dx and dy are needed again in the last stage of the pipeline, so they travel
// alongside the data and leave this section together with r3.
//
// Interface and timing: en_in marks a valid input; en_out rises with the
// matching r3/dx/dy exactly five clocks later. A new pair may enter on every
// clock and nothing stalls. rst_n (synchronous, active low) clears the valid
// bits only; data registers are not reset.
//
// The five-stage count, the port names and the formula follow the source
// design; the assignment of operations to stages and the dx/dy side-band are
// this design's choices.
module r3_unit #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en_in,
  input  logic [EXP_W+MAN_W:0] rx_a,
  input  logic [EXP_W+MAN_W:0] rx_b,
  input  logic [EXP_W+MAN_W:0] ry_a,
  input  logic [EXP_W+MAN_W:0] ry_b,
  output logic                 en_out,
  output logic [EXP_W+MAN_W:0] r3,
  output logic [EXP_W+MAN_W:0] dx,
  output logic [EXP_W+MAN_W:0] dy
);

  localparam int unsigned W = EXP_W + MAN_W + 1;
  localparam int unsigned N = nbody_pkg::R3_STAGES;   // 5

  logic [N-1:0] en_q;
  // dx/dy delay line: index k holds the value after stage k+1
  logic [W-1:0] dx_q [N];
  logic [W-1:0] dy_q [N];
  logic [W-1:0] dx2_q, dy2_q, r_q, r_s4_q, r2_q, r3_q;

  logic [W-1:0] dx_c, dy_c, dx2_c, dy2_c, r_c, r2_c, r3_c;

  fp_add #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_sub_x (.a(rx_b), .b(rx_a), .sub(1'b1), .y(dx_c));
  fp_add #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_sub_y (.a(ry_b), .b(ry_a), .sub(1'b1), .y(dy_c));
  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_sq_x  (.a(dx_q[0]), .b(dx_q[0]), .y(dx2_c));
  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_sq_y  (.a(dy_q[0]), .b(dy_q[0]), .y(dy2_c));
  fp_add #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_sum   (.a(dx2_q), .b(dy2_q), .sub(1'b0), .y(r_c));
  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_r2    (.a(r_q), .b(r_q), .y(r2_c));
  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_r3    (.a(r2_q), .b(r_s4_q), .y(r3_c));

  always_ff @(posedge clk) begin
    if (!rst_n) en_q <= '0;
    else        en_q <= {en_q[N-2:0], en_in};
  end

  always_ff @(posedge clk) begin
    dx_q[0] <= dx_c;
    dy_q[0] <= dy_c;
    for (int k = 1; k < N; k++) begin
      dx_q[k] <= dx_q[k-1];
      dy_q[k] <= dy_q[k-1];
    end
    dx2_q  <= dx2_c;       // stage 2
    dy2_q  <= dy2_c;
    r_q    <= r_c;         // stage 3
    r2_q   <= r2_c;        // stage 4
    r_s4_q <= r_q;         //   r kept for stage 5
    r3_q   <= r3_c;        // stage 5
  end

  assign en_out = en_q[N-1];
  assign r3     = r3_q;
  assign dx     = dx_q[N-1];
  assign dy     = dy_q[N-1];

endmodule
