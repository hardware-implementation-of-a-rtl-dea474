// tb_uart_in: self-checking testbench for uart_in.
//
// A serial driver sends particle pairs (32 random bytes each, 8N1, LSB first)
// at 16 clocks per bit. After every pair 'en' must pulse exactly once, within
// two bit periods after the last stop bit, and rx_a..ry_b must hold the words
// assembled least-significant byte first. A frame with a low stop bit is sent
// between two pairs and must be ignored.
module tb_uart_in;

  localparam int CLK_HZ = 16, BAUD = 1, CPB = CLK_HZ / BAUD;

  logic        clk = 0, rst_n = 0, rx = 1;
  logic        en;
  logic [63:0] rx_a, rx_b, ry_a, ry_b;
  int          checks = 0, failures = 0, en_count = 0, bad_frames = 0;

  uart_in #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (en) en_count <= en_count + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_byte(input logic [7:0] b, input logic stop = 1'b1);
    @(negedge clk) rx = 0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      rx = b[i];
      repeat (CPB) @(negedge clk);
    end
    rx = stop;
    repeat (CPB) @(negedge clk);
    rx = 1;
  endtask

  initial begin
    logic [255:0] pair;
    int           n0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (CPB) @(posedge clk);
    for (int p = 0; p < 12; p++) begin
      pair = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      n0 = en_count;
      for (int k = 0; k < 32; k++) begin
        send_byte(pair[8*k +: 8]);
        if (k < 31) begin
          checks++;
          if (en_count != n0) begin failures++; $display("FAIL: early en at byte %0d", k); end
        end
      end
      repeat (2 * CPB) @(negedge clk);
      checks++;
      if (en_count != n0 + 1) begin
        failures++;
        $display("FAIL: pair %0d gave %0d en pulses", p, en_count - n0);
      end
      checks++;
      if ({ry_b, ry_a, rx_b, rx_a} !== pair) begin
        failures++;
        $display("FAIL: pair %0d words %h %h %h %h", p, rx_a, rx_b, ry_a, ry_b);
      end
      if (p == 5) begin
        send_byte(8'hA5, 1'b0);   // framing error: must be dropped
        bad_frames++;
        repeat (2 * CPB) @(negedge clk);
      end
    end
    checks++;
    if (bad_frames == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
