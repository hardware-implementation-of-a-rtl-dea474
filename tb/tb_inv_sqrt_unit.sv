// tb_inv_sqrt_unit: self-checking testbench for inv_sqrt_unit.
//
// Random positive inputs over a wide exponent range enter on most clocks. Each
// result must (1) arrive exactly four clocks after its input, (2) equal bit for
// bit the fast inverse square root computed with double arithmetic, and
// (3) lie within 0.2 % of the true 1/sqrt(x). dx/dy must pass through intact.
module tb_inv_sqrt_unit;
  import nbody_ref_pkg::*;

  localparam int LAT = 4;

  logic        clk = 0, rst_n = 0, en_in = 0;
  logic [63:0] r3 = 0, dx_in = 0, dy_in = 0;
  logic        en_out;
  logic [63:0] y, dx_out, dy_out;
  int          checks = 0, failures = 0, cycle = 0;
  real         worst = 0.0;

  logic [63:0] in_q[$], dx_q[$], dy_q[$];
  int          t_q[$];

  inv_sqrt_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && en_out) begin
      logic [63:0] x, ex, edx, edy;
      int          t;
      real         err;
      checks++;
      if (in_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected en_out");
      end else begin
        x = in_q.pop_front(); edx = dx_q.pop_front(); edy = dy_q.pop_front();
        t = t_q.pop_front();
        ex = fisr(x);
        if (cycle - t != LAT) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cycle - t, LAT);
        end
        if (y !== ex || dx_out !== edx || dy_out !== edy) begin
          failures++;
          $display("FAIL: x=%h y=%h expected %h", x, y, ex);
        end
        err = rel_err($bitstoreal(y), 1.0 / $sqrt($bitstoreal(x)));
        if (err > worst) worst = err;
        if (err > 0.002) begin
          failures++;
          $display("FAIL: x=%h relative error %g", x, err);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en_in = ($urandom % 6) != 0;
      r3 = {1'b0, 11'(1023 - 600 + ($urandom % 1200)), 20'($urandom), 32'($urandom)};
      if (i % 100 == 0) r3 = 64'h3FF0000000000000;   // 1.0
      if (i % 100 == 1) r3 = 64'h4010000000000000;   // 4.0
      dx_in = {32'($urandom), 32'($urandom)};
      dy_in = {32'($urandom), 32'($urandom)};
      if (en_in) begin
        in_q.push_back(r3); dx_q.push_back(dx_in); dy_q.push_back(dy_in);
        t_q.push_back(cycle);
      end
    end
    @(negedge clk);
    en_in = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (in_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never came out", in_q.size());
    end
    $display("worst relative error %g", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
