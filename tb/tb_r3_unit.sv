// tb_r3_unit: self-checking testbench for r3_unit.
//
// Random particle pairs are offered on most clocks (back to back, with gaps).
// Every en_out must come exactly five clocks after its en_in, in order, and
// r3, dx and dy must equal the reference computed with double arithmetic in
// the same order. Reset in the middle of a stream must clear all valid bits.
module tb_r3_unit;
  import nbody_ref_pkg::*;

  localparam int LAT = 5;

  logic        clk = 0, rst_n = 0, en_in = 0;
  logic [63:0] rx_a = 0, rx_b = 0, ry_a = 0, ry_b = 0;
  logic        en_out;
  logic [63:0] r3, dx, dy;
  int          checks = 0, failures = 0, cycle = 0;

  ref_t        exp_q[$];
  int          t_q[$];

  r3_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && en_out) begin
      ref_t e;
      int   t;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected en_out at cycle %0d", cycle);
      end else begin
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (cycle - t != LAT) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cycle - t, LAT);
        end
        if (r3 !== e.r3 || dx !== e.dx || dy !== e.dy) begin
          failures++;
          $display("FAIL: r3=%h dx=%h dy=%h expected %h %h %h", r3, dx, dy, e.r3, e.dx, e.dy);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en_in = ($urandom % 8) != 0;
      rx_a = rnd_pos(); rx_b = rnd_pos(); ry_a = rnd_pos(); ry_b = rnd_pos();
      if (i % 50 == 0) begin rx_b = rx_a; ry_b = ry_a + 64'd1; end   // tiny distance
      if (en_in) begin
        exp_q.push_back(force_ref(rx_a, rx_b, ry_a, ry_b));
        t_q.push_back(cycle);
      end
    end
    @(negedge clk);
    en_in = 0;
    repeat (LAT + 2) @(posedge clk);
    // reset with the pipe full: no output may appear afterwards
    @(negedge clk);
    en_in = 1;
    repeat (3) @(negedge clk);
    rst_n = 0; en_in = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < LAT + 2; i++) begin
      @(negedge clk);
      checks++;
      if (en_out) begin failures++; $display("FAIL: en_out after reset"); end
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never came out", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
