// tb_fp_mul: self-checking testbench for fp_mul (binary64).
//
// Random operands with exponents within +-300 of 1.0 (products stay in the
// normal range) are multiplied; each result must equal, bit for bit, the
// simulator's IEEE 754 double product (round to nearest even). Fixed special
// cases cover zero, infinity, inf*0, overflow and underflow to zero.
module tb_fp_mul;

  logic [63:0] a, b, y;
  int          checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  function automatic logic [63:0] rnd_fp(input int unsigned erange);
    logic [63:0] v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(1023 - erange + ($urandom % (2 * erange + 1)));
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  task automatic check(input logic [63:0] ta, input logic [63:0] tb_, input logic [63:0] expect_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== expect_y) begin
      failures++;
      if (failures < 10) $display("FAIL: %h * %h = %h, expected %h", ta, tb_, y, expect_y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] ra, rb;
    for (int i = 0; i < 40000; i++) begin
      ra = rnd_fp(300); rb = rnd_fp(300);
      if (i % 4 == 0) rb[51:30] = '0;   // short mantissas: exact ties and round-up carries
      check(ra, rb, $realtobits($bitstoreal(ra) * $bitstoreal(rb)));
    end
    check(64'h3FF8000000000000, 64'h4000000000000000, 64'h4008000000000000); // 1.5*2 = 3
    check(64'h0, 64'hC000000000000000, 64'h8000000000000000);                // 0*-2 = -0
    check(64'h7FF0000000000000, 64'h0, 64'h7FF8000000000000);                // inf*0
    check(64'hFFF0000000000000, 64'h4000000000000000, 64'hFFF0000000000000); // -inf*2
    check(64'h7FE0000000000000, 64'h7FE0000000000000, 64'h7FF0000000000000); // overflow
    check(64'h0010000000000000, 64'h3E00000000000000, 64'h0);                // flush to zero
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
