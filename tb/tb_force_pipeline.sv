// tb_force_pipeline: end-to-end check of the ten-stage force pipeline.
//
// Phase 1 feeds a new random particle pair on every clock for a long run
// (full throughput), phase 2 feeds with random gaps. Every result must come
// out exactly ten clocks after its pair, in order, equal bit for bit to the
// reference model, and within 0.2 % of the exact Newtonian force
// (x_j - x_i)/|r|^3 computed with a true square root.
module tb_force_pipeline;
  import nbody_ref_pkg::*;

  localparam int LAT = nbody_pkg::PIPE_STAGES;

  logic        clk = 0, rst_n = 0, en_in = 0;
  logic [63:0] rx_a = 0, rx_b = 0, ry_a = 0, ry_b = 0;
  logic        en_out;
  logic [63:0] fx, fy;
  int          checks = 0, failures = 0, cycle = 0;
  int          longest_burst = 0, burst = 0;
  real         worst = 0.0;

  ref_t        exp_q[$];
  real         ex_q[$], ey_q[$];
  int          t_q[$];

  force_pipeline dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && en_out) begin
      ref_t e;
      int   t;
      real  wx, wy, err;
      burst++;
      if (burst > longest_burst) longest_burst = burst;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected en_out");
      end else begin
        e = exp_q.pop_front(); t = t_q.pop_front();
        wx = ex_q.pop_front(); wy = ey_q.pop_front();
        if (cycle - t != LAT) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cycle - t, LAT);
        end
        if (fx !== e.fx || fy !== e.fy) begin
          failures++;
          $display("FAIL: fx=%h fy=%h expected %h %h", fx, fy, e.fx, e.fy);
        end
        err = rel_err($bitstoreal(fx), wx);
        if (rel_err($bitstoreal(fy), wy) > err) err = rel_err($bitstoreal(fy), wy);
        if (err > worst) worst = err;
        if (err > 0.002) begin
          failures++;
          $display("FAIL: relative error %g", err);
        end
      end
    end else begin
      burst = 0;
    end
  end

  task automatic drive(input bit valid);
    real dx, dy, d;
    @(negedge clk);
    en_in = valid;
    rx_a = rnd_pos(); rx_b = rnd_pos(); ry_a = rnd_pos(); ry_b = rnd_pos();
    if (valid) begin
      exp_q.push_back(force_ref(rx_a, rx_b, ry_a, ry_b));
      t_q.push_back(cycle);
      dx = $bitstoreal(rx_b) - $bitstoreal(rx_a);
      dy = $bitstoreal(ry_b) - $bitstoreal(ry_a);
      d  = $sqrt(dx * dx + dy * dy);
      ex_q.push_back(dx / (d * d * d));
      ey_q.push_back(dy / (d * d * d));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) drive(1'b1);
    for (int i = 0; i < 2000; i++) drive(($urandom % 3) != 0);
    @(negedge clk);
    en_in = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never came out", exp_q.size());
    end
    checks++;
    if (longest_burst < 2000) begin
      failures++;
      $display("FAIL: longest run of back-to-back results %0d", longest_burst);
    end
    $display("worst relative error against exact force %g, longest burst %0d", worst, longest_burst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
