// tb_fp_add: self-checking testbench for fp_add (binary64).
//
// Random operands with exponents near 1.0 (so that no result is subnormal),
// plus operands with equal or nearly equal magnitudes to exercise cancellation,
// are added and subtracted. Every result must equal, bit for bit, the
// simulator's own IEEE 754 double arithmetic (round to nearest even). A few
// special cases (zeros, x - x, infinity) are checked against fixed encodings.
module tb_fp_add;

  logic [63:0] a, b, y;
  logic        sub;
  int          checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .sub(sub), .y(y));

  function automatic logic [63:0] rnd_fp(input int unsigned erange);
    logic [63:0] v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(1023 - erange + ($urandom % (2 * erange + 1)));
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  task automatic check(input logic [63:0] ta, input logic [63:0] tb_, input logic ts,
                       input logic [63:0] expect_y);
    a = ta; b = tb_; sub = ts;
    #1;
    checks++;
    if (y !== expect_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL: %h %s %h = %h, expected %h", ta, ts ? "-" : "+", tb_, y, expect_y);
    end
  endtask

  function automatic logic [63:0] ref_op(input logic [63:0] ra, input logic [63:0] rb,
                                         input logic rs);
    real r;
    r = rs ? ($bitstoreal(ra) - $bitstoreal(rb)) : ($bitstoreal(ra) + $bitstoreal(rb));
    return $realtobits(r);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] ra, rb;
    logic        rs;
    // random operands, wide exponent spread (alignment shifts beyond the field)
    for (int i = 0; i < 20000; i++) begin
      ra = rnd_fp(80); rb = rnd_fp(80); rs = 1'($urandom);
      check(ra, rb, rs, ref_op(ra, rb, rs));
    end
    // near-equal magnitudes: heavy cancellation
    for (int i = 0; i < 20000; i++) begin
      ra = rnd_fp(3);
      rb = ra;
      rb[5:0] = 6'($urandom);
      if ($urandom % 2) rb[62:52] = rb[62:52] + 11'($urandom % 3) - 11'd1;
      rs = 1'($urandom);
      check(ra, rb, rs, ref_op(ra, rb, rs));
    end
    // special cases
    check(64'h3FF0000000000000, 64'h3FF0000000000000, 1'b1, 64'h0);                // 1-1 = +0
    check(64'h4000000000000000, 64'h0, 1'b0, 64'h4000000000000000);                // 2+0
    check(64'h0, 64'h4000000000000000, 1'b1, 64'hC000000000000000);                // 0-2
    check(64'h7FF0000000000000, 64'h3FF0000000000000, 1'b0, 64'h7FF0000000000000); // inf+1
    check(64'h7FF0000000000000, 64'h7FF0000000000000, 1'b1, 64'h7FF8000000000000); // inf-inf
    check(64'h7FEFFFFFFFFFFFFF, 64'h7FEFFFFFFFFFFFFF, 1'b0, 64'h7FF0000000000000); // overflow
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
