// tb_nbody_top: end-to-end test of the whole FPGA design at its default
// settings (50 MHz clock, 115200 baud, binary64 pipeline).
//
// A host model sends particle pairs over gpio0_rx and, in parallel, reads the
// returned forces from gpio1_tx. Each returned (fx, fy) must equal the
// reference model bit for bit. The test makes each mechanism of the design
// happen and counts it:
//   - pairs assembled by the serial front end (en pulses into the pipeline),
//   - results leaving the pipeline 10 clocks later (latency checked),
//   - results sent back while the next pair is already arriving (overlap),
//   - a reset from KEY(1) in the middle of a pair, after which the partial
//     pair must be forgotten and the next full pair processed normally.
// A mechanism that never happened counts as a failure.
module tb_nbody_top;
  import nbody_ref_pkg::*;

  localparam int CPB    = 50_000_000 / 115_200;
  localparam int NPAIRS = 4;

  logic clk_50 = 0, key1_n = 0, gpio0_rx = 1;
  logic gpio1_tx;
  int   checks = 0, failures = 0, cycle = 0;
  int   n_pairs_in = 0, n_results = 0, n_overlap = 0, n_resets = 0, n_received = 0;
  int   t_en_q[$];
  real  first_fx = 0.0, first_fy = 0.0;
  ref_t exp_q[$];

  nbody_top dut (.*);

  always #10 clk_50 = ~clk_50;     // 50 MHz
  always @(posedge clk_50) cycle <= cycle + 1;

  initial begin
    repeat (2_500_000) @(posedge clk_50);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // probe the internal EN pulses to count events and check the pipeline latency
  always @(posedge clk_50) begin
    if (dut.rst_n && dut.en_in) begin
      n_pairs_in++;
      t_en_q.push_back(cycle);
    end
    if (dut.rst_n && dut.en_out) begin
      n_results++;
      checks++;
      if (t_en_q.size() == 0 || cycle - t_en_q.pop_front() != nbody_pkg::PIPE_STAGES) begin
        failures++;
        $display("FAIL: pipeline latency wrong");
      end
    end
    if (dut.u_uart_out.busy && dut.u_uart_in.byte_cnt != 0) n_overlap <= n_overlap + 1;
  end

  task automatic send_byte(input logic [7:0] b);
    @(negedge clk_50) gpio0_rx = 0;
    repeat (CPB) @(negedge clk_50);
    for (int i = 0; i < 8; i++) begin
      gpio0_rx = b[i];
      repeat (CPB) @(negedge clk_50);
    end
    gpio0_rx = 1;
    repeat (CPB) @(negedge clk_50);
  endtask

  task automatic send_pair(input logic [63:0] xa, input logic [63:0] xb,
                           input logic [63:0] ya, input logic [63:0] yb);
    logic [255:0] w;
    w = {yb, ya, xb, xa};
    for (int k = 0; k < 32; k++) send_byte(w[8*k +: 8]);
  endtask

  task automatic recv_byte(output logic [7:0] b);
    while (gpio1_tx) @(posedge clk_50);
    repeat (CPB / 2) @(posedge clk_50);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge clk_50);
      b[i] = gpio1_tx;
    end
    repeat (CPB) @(posedge clk_50);
    checks++;
    if (gpio1_tx !== 1'b1) begin failures++; $display("FAIL: stop bit"); end
  endtask

  // host receive side
  initial begin
    logic [127:0] r;
    logic [7:0]   b;
    ref_t         e;
    wait (key1_n);
    repeat (10) @(posedge clk_50);
    forever begin
      for (int k = 0; k < 16; k++) begin
        recv_byte(b);
        r[8*k +: 8] = b;
      end
      n_received++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result %h", r);
      end else begin
        e = exp_q.pop_front();
        if (r !== {e.fy, e.fx}) begin
          failures++;
          $display("FAIL: got fx=%h fy=%h expected %h %h", r[63:0], r[127:64], e.fx, e.fy);
        end else begin
          $display("result %0d: fx=%g fy=%g", n_received, $bitstoreal(e.fx), $bitstoreal(e.fy));
          if (n_received == 1) begin
            first_fx = $bitstoreal(r[63:0]);
            first_fy = $bitstoreal(r[127:64]);
          end
        end
      end
    end
  end

  // host send side
  initial begin
    logic [63:0] xa, xb, ya, yb;
    repeat (10) @(posedge clk_50);
    key1_n = 1;
    repeat (CPB) @(posedge clk_50);
    for (int p = 0; p < NPAIRS; p++) begin
      if (p == 0) begin
        // bodies at (0,0) and (3,4): |r| = 5, force = (3,4)/125
        xa = $realtobits(0.0); xb = $realtobits(3.0);
        ya = $realtobits(0.0); yb = $realtobits(4.0);
      end else begin
        xa = rnd_pos(); xb = rnd_pos(); ya = rnd_pos(); yb = rnd_pos();
      end
      exp_q.push_back(force_ref(xa, xb, ya, yb));
      send_pair(xa, xb, ya, yb);
      if (p == 1) begin
        // half a pair, then KEY(1) pressed: the partial pair must vanish
        for (int k = 0; k < 5; k++) send_byte(8'($urandom));
        // let the previous result finish before resetting
        wait (n_received == 2);
        @(negedge clk_50) key1_n = 0;
        repeat (20) @(negedge clk_50);
        key1_n = 1;
        n_resets++;
        repeat (CPB) @(negedge clk_50);
      end
    end
    wait (n_received == NPAIRS);
    repeat (4 * CPB) @(posedge clk_50);
    checks++;
    if (exp_q.size() != 0 || n_results != NPAIRS || n_pairs_in != NPAIRS) begin
      failures++;
      $display("FAIL: pairs in %0d, results %0d, received %0d", n_pairs_in, n_results, n_received);
    end
    // force for the 3-4-5 pair must be within 0.2 % of (3/125, 4/125)
    checks++;
    if (rel_err(first_fx, 0.024) > 0.002 || rel_err(first_fy, 0.032) > 0.002) begin
      failures++;
      $display("FAIL: 3-4-5 pair gave (%g, %g)", first_fx, first_fy);
    end
    checks++;
    $display("mechanisms: pairs=%0d results=%0d overlap_clocks=%0d resets=%0d",
             n_pairs_in, n_results, n_overlap, n_resets);
    if (n_pairs_in == 0) begin failures++; $display("FAIL: no pair assembled"); end
    checks++;
    if (n_results == 0) begin failures++; $display("FAIL: no pipeline result"); end
    checks++;
    if (n_overlap == 0) begin failures++; $display("FAIL: receive and transmit never overlapped"); end
    checks++;
    if (n_resets == 0) begin failures++; $display("FAIL: reset never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
