// force_stage: last stage of the force pipeline, one clock.
//
// fx = inv * dx and fy = inv * dy, where inv = 1/|r_ij|^3 from the inverse
// square root section and (dx, dy) = (xj - xi, yj - yi). The result is the
// gravitational force on body i from body j for G*m_i*m_j = 1; the caller
// applies the mass and G factor (the pipeline is fed positions only).
//
// Interface and timing: two multipliers side by side, results registered;
// en_out follows en_in by one clock. rst_n (synchronous, active low) clears the
// valid bit only.
//
// The equations and the one-stage depth follow the source design; leaving out
// the G*m_i*m_j factor is this design's reading of a pipeline whose only inputs
// are positions.
module force_stage #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en_in,
  input  logic [EXP_W+MAN_W:0] inv,
  input  logic [EXP_W+MAN_W:0] dx,
  input  logic [EXP_W+MAN_W:0] dy,
  output logic                 en_out,
  output logic [EXP_W+MAN_W:0] fx,
  output logic [EXP_W+MAN_W:0] fy
);

  logic [EXP_W+MAN_W:0] fx_c, fy_c;

  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_fx (.a(inv), .b(dx), .y(fx_c));
  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_fy (.a(inv), .b(dy), .y(fy_c));

  always_ff @(posedge clk) begin
    if (!rst_n) en_out <= 1'b0;
    else        en_out <= en_in;
  end

  always_ff @(posedge clk) begin
    fx <= fx_c;
    fy <= fy_c;
  end

endmodule
