// tb_force_pipeline_fp32: the force pipeline built in a reduced format.
//
// The floating-point units are parameterised in their exponent and mantissa
// widths so that a cheaper pipeline can be built when double precision is not
// needed. This testbench builds force_pipeline in IEEE 754 binary32 (8-bit
// exponent, 23-bit fraction) with the classic single-precision fast inverse
// square root constant 0x5F3759DF, feeds a new random pair on every clock, and
// checks the 10-clock latency and that every force is within 0.2 % (the error
// of one Newton step) plus a few single-precision roundings of the exact value.
module tb_force_pipeline_fp32;

  localparam int LAT = nbody_pkg::PIPE_STAGES;

  logic        clk = 0, rst_n = 0, en_in = 0;
  logic [31:0] rx_a = 0, rx_b = 0, ry_a = 0, ry_b = 0;
  logic        en_out;
  logic [31:0] fx, fy;
  int          checks = 0, failures = 0, cycle = 0;
  real         worst = 0.0;
  real         ex_q[$], ey_q[$];
  int          t_q[$];

  force_pipeline #(.EXP_W(8), .MAN_W(23), .MAGIC(32'h5F37_59DF)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real f32(input logic [31:0] v);
    real m;
    int  e;
    m = 1.0 + real'(v[22:0]) / 8388608.0;
    e = int'(v[30:23]) - 127;
    for (int k = 0; k < e; k++) m = m * 2.0;
    for (int k = 0; k > e; k--) m = m / 2.0;
    return v[31] ? -m : m;
  endfunction

  // coordinate in +-[2^-4, 2^4), distinct enough to keep r^3 in range
  function automatic logic [31:0] rnd32();
    return {1'($urandom), 8'(127 - 4 + ($urandom % 8)), 23'($urandom)};
  endfunction

  function automatic real rel_err(input real got, input real want);
    real d;
    d = got - want;
    if (d < 0.0) d = -d;
    if (want < 0.0) want = -want;
    return d / want;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && en_out) begin
      real wx, wy, err;
      int  t;
      checks++;
      if (t_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected en_out");
      end else begin
        wx = ex_q.pop_front(); wy = ey_q.pop_front(); t = t_q.pop_front();
        if (cycle - t != LAT) begin
          failures++;
          $display("FAIL: latency %0d", cycle - t);
        end
        err = rel_err(f32(fx), wx);
        if (rel_err(f32(fy), wy) > err) err = rel_err(f32(fy), wy);
        if (err > worst) worst = err;
        if (err > 0.0021) begin
          failures++;
          $display("FAIL: fx=%h fy=%h (%g %g) expected %g %g", fx, fy, f32(fx), f32(fy), wx, wy);
        end
      end
    end
  end

  initial begin
    real dx, dy, d;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en_in = 1;
      rx_a = rnd32(); rx_b = rnd32(); ry_a = rnd32(); ry_b = rnd32();
      // keep the two bodies apart, so dx, dy carry no cancellation error
      if (rx_a[31] == rx_b[31]) rx_b[31] = ~rx_b[31];
      if (ry_a[31] == ry_b[31]) ry_b[31] = ~ry_b[31];
      dx = f32(rx_b) - f32(rx_a);
      dy = f32(ry_b) - f32(ry_a);
      d  = $sqrt(dx * dx + dy * dy);
      ex_q.push_back(dx / (d * d * d));
      ey_q.push_back(dy / (d * d * d));
      t_q.push_back(cycle);
    end
    @(negedge clk);
    en_in = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (t_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never came out", t_q.size());
    end
    $display("binary32 worst relative error %g", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
