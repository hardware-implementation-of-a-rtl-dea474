// tb_uart_out: self-checking testbench for uart_out.
//
// Results (fx, fy) are handed over with a one-clock 'en' pulse. A serial
// monitor samples the line in the middle of each bit (16 clocks per bit) and
// checks the start and stop bits. The 16 bytes received must equal fx then fy,
// least-significant byte first; 'busy' must cover the transfer, and a result's
// transfer must take 160 bit periods (within one bit).
module tb_uart_out;

  localparam int CLK_HZ = 16, BAUD = 1, CPB = CLK_HZ / BAUD;

  logic        clk = 0, rst_n = 0, en = 0;
  logic [63:0] fx = 0, fy = 0;
  logic        tx, busy;
  int          checks = 0, failures = 0, cycle = 0;

  uart_out #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic recv_byte(output logic [7:0] b);
    while (tx) @(posedge clk);
    repeat (CPB / 2) @(posedge clk);
    checks++;
    if (tx !== 1'b0) begin failures++; $display("FAIL: bad start bit"); end
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge clk);
      b[i] = tx;
    end
    repeat (CPB) @(posedge clk);
    checks++;
    if (tx !== 1'b1) begin failures++; $display("FAIL: bad stop bit"); end
  endtask

  initial begin
    logic [127:0] got;
    logic [7:0]   b;
    int           t0, t1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    checks++;
    if (tx !== 1'b1 || busy) begin failures++; $display("FAIL: line not idle after reset"); end
    for (int r = 0; r < 8; r++) begin
      @(negedge clk);
      fx = {$urandom, $urandom}; fy = {$urandom, $urandom};
      if (r == 0) begin fx = 64'h3FF0_0000_0000_0000; fy = 64'hC000_0000_0000_0001; end
      en = 1;
      @(negedge clk);
      en = 0;
      t0 = cycle;
      for (int k = 0; k < 16; k++) begin
        recv_byte(b);
        got[8*k +: 8] = b;
        if (k < 15) begin
          checks++;
          if (!busy) begin failures++; $display("FAIL: busy dropped at byte %0d", k); end
        end
      end
      while (busy) @(posedge clk);
      t1 = cycle;
      checks++;
      if (got !== {fy, fx}) begin
        failures++;
        $display("FAIL: result %0d sent %h, expected %h", r, got, {fy, fx});
      end
      checks++;
      if ((t1 - t0) < 160 * CPB - CPB || (t1 - t0) > 160 * CPB + CPB) begin
        failures++;
        $display("FAIL: transfer took %0d clocks, expected %0d", t1 - t0, 160 * CPB);
      end
      repeat ($urandom % 20) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
