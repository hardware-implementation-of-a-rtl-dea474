// force_pipeline: the ten-stage gravitational force engine.
//
// For a pair of bodies i (rx_a, ry_a) and j (rx_b, ry_b) it returns
//     fx = (xj - xi) / sqrt(r^3),   fy = (yj - yi) / sqrt(r^3),
//     r  = (xj - xi)^2 + (yj - yi)^2,
// i.e. the 2D Newtonian force on body i for G*m_i*m_j = 1, in IEEE 754
// binary64. Sections, as in the source design:
//     r3_unit        5 stages   r^3 and the coordinate differences
//     inv_sqrt_unit  4 stages   fast inverse square root of r^3
//     force_stage    1 stage    products with dx and dy
// Every stage has its own arithmetic units and registers, so a new pair can be
// accepted on every clock with no hazards and no stall logic.
//
// Interface and timing: en_in marks a valid pair; en_out marks the matching
// fx/fy exactly PIPE_STAGES = 10 clocks later. rst_n is synchronous and active
// low and clears only the valid bits.
module force_pipeline
  import nbody_pkg::*;
#(
  parameter int unsigned          EXP_W = 11,
  parameter int unsigned          MAN_W = 52,
  parameter logic [EXP_W+MAN_W:0] MAGIC = FISR_MAGIC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en_in,
  input  logic [EXP_W+MAN_W:0] rx_a,
  input  logic [EXP_W+MAN_W:0] rx_b,
  input  logic [EXP_W+MAN_W:0] ry_a,
  input  logic [EXP_W+MAN_W:0] ry_b,
  output logic                 en_out,
  output logic [EXP_W+MAN_W:0] fx,
  output logic [EXP_W+MAN_W:0] fy
);

  logic                 en_r3, en_inv;
  logic [EXP_W+MAN_W:0] r3, dx_r3, dy_r3, inv, dx_inv, dy_inv;

  r3_unit #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_r3 (
    .clk, .rst_n, .en_in,
    .rx_a, .rx_b, .ry_a, .ry_b,
    .en_out(en_r3), .r3(r3), .dx(dx_r3), .dy(dy_r3)
  );

  inv_sqrt_unit #(.EXP_W(EXP_W), .MAN_W(MAN_W), .MAGIC(MAGIC)) u_isqrt (
    .clk, .rst_n, .en_in(en_r3),
    .r3(r3), .dx_in(dx_r3), .dy_in(dy_r3),
    .en_out(en_inv), .y(inv), .dx_out(dx_inv), .dy_out(dy_inv)
  );

  force_stage #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_force (
    .clk, .rst_n, .en_in(en_inv),
    .inv(inv), .dx(dx_inv), .dy(dy_inv),
    .en_out(en_out), .fx(fx), .fy(fy)
  );

endmodule
