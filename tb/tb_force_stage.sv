// tb_force_stage: self-checking testbench for force_stage.
//
// Random inv/dx/dy triples enter on most clocks; fx and fy must equal the
// double products inv*dx and inv*dy and appear exactly one clock later.
module tb_force_stage;

  logic        clk = 0, rst_n = 0, en_in = 0;
  logic [63:0] inv = 0, dx = 0, dy = 0;
  logic        en_out;
  logic [63:0] fx, fy;
  int          checks = 0, failures = 0, cycle = 0;
  logic [63:0] fx_q[$], fy_q[$];
  int          t_q[$];

  force_stage dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [63:0] rnd(input int unsigned erange);
    return {1'($urandom), 11'(1023 - erange + ($urandom % (2 * erange + 1))),
            20'($urandom), 32'($urandom)};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && en_out) begin
      logic [63:0] ex, ey;
      int t;
      checks++;
      if (fx_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected en_out");
      end else begin
        ex = fx_q.pop_front(); ey = fy_q.pop_front(); t = t_q.pop_front();
        if (cycle - t != 1) begin
          failures++;
          $display("FAIL: latency %0d", cycle - t);
        end
        if (fx !== ex || fy !== ey) begin
          failures++;
          $display("FAIL: fx=%h fy=%h expected %h %h", fx, fy, ex, ey);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en_in = ($urandom % 5) != 0;
      inv = rnd(200); dx = rnd(200); dy = rnd(200);
      if (en_in) begin
        fx_q.push_back($realtobits($bitstoreal(inv) * $bitstoreal(dx)));
        fy_q.push_back($realtobits($bitstoreal(inv) * $bitstoreal(dy)));
        t_q.push_back(cycle);
      end
    end
    @(negedge clk);
    en_in = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (fx_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never came out", fx_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
