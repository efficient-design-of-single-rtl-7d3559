// tb_fp_multiplier: end-to-end check of the single-precision multiplier at
// its default configuration.
//
// Reference: both operands are widened to IEEE double precision, multiplied
// with the simulator's real arithmetic (exact, since two 24-bit significands
// give at most 48 bits and a double holds 53) and the double result is cut
// back to single precision by truncation, which is rounding toward zero. The
// reference applies the multiplier's conventions independently: subnormal
// operands count as zero, results below the normal range become a signed
// zero, results above it the largest finite number, and NaN operands or
// infinity x zero the quiet NaN 0x7fc00000.
//
// Stimulus: directed cases (exact products, signs, every special-operand
// class, both range limits) then random operands, some over the full
// exponent range and most from a narrow range so that ordinary products
// dominate. Every mechanism of the design is counted and must occur at
// least once: normalisation shift and no shift, overflow, underflow, zero
// operand, infinite operand, invalid operation, and a carry out of the half
// sums inside the Karatsuba recursion. The multiplier is combinational, so
// its latency is zero: each result is checked 1 time unit after the
// operands, within the same clock cycle. A watchdog stops the run after a
// fixed number of cycles.
module tb_fp_multiplier;

  logic [31:0] a, b, p;
  logic        overflow, underflow, invalid;
  logic        clk = 1'b0;
  int          checks = 0;
  int          failures = 0;

  int n_shift = 0, n_noshift = 0, n_overflow = 0, n_underflow = 0;
  int n_zero = 0, n_inf = 0, n_invalid = 0, n_kara_carry = 0;

  fp_multiplier dut (
    .a(a), .b(b), .p(p),
    .overflow(overflow), .underflow(underflow), .invalid(invalid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Single to double, for normal operands.
  function automatic real to_real(input logic [31:0] x);
    logic [63:0] d;
    d = {x[31], 11'(x[30:23]) + 11'd896, x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // Reference product and flags {overflow, underflow, invalid}.
  function automatic logic [34:0] reference(input logic [31:0] x, input logic [31:0] y);
    logic        s;
    logic        xz, yz, xi, yi, xn, yn;
    logic [63:0] d;
    int          e;
    s  = x[31] ^ y[31];
    xz = (x[30:23] == 8'd0);
    yz = (y[30:23] == 8'd0);
    xi = (x[30:23] == 8'hff) && (x[22:0] == 23'd0);
    yi = (y[30:23] == 8'hff) && (y[22:0] == 23'd0);
    xn = (x[30:23] == 8'hff) && (x[22:0] != 23'd0);
    yn = (y[30:23] == 8'hff) && (y[22:0] != 23'd0);
    if (xn || yn || ((xi || yi) && (xz || yz))) return {32'h7fc0_0000, 3'b001};
    if (xi || yi) return {s, 8'hff, 23'd0, 3'b000};
    if (xz || yz) return {s, 31'd0, 3'b000};
    d = $realtobits(to_real(x) * to_real(y));
    e = int'(d[62:52]) - 1023 + 127;
    if (e >= 255) return {s, 31'h7f7f_ffff, 3'b100};
    if (e <= 0)   return {s, 31'd0, 3'b010};
    return {s, 8'(e), d[51:29], 3'b000};
  endfunction

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [34:0] expected;
    logic [23:0] mx, my;
    a = x;
    b = y;
    #1;
    expected = reference(x, y);
    checks++;
    if ({p, overflow, underflow, invalid} !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h * %h: got %h ovf=%b unf=%b inv=%b expected %h flags=%b",
                 x, y, p, overflow, underflow, invalid, expected[34:3], expected[2:0]);
    end
    // Mechanism counts.
    if (invalid) n_invalid++;
    else if (x[30:23] == 8'hff || y[30:23] == 8'hff) n_inf++;
    else if (x[30:23] == 8'd0 || y[30:23] == 8'd0) n_zero++;
    else begin
      if (overflow) n_overflow++;
      if (underflow) n_underflow++;
      mx = {1'b1, x[22:0]};
      my = {1'b1, y[22:0]};
      if ((48'(mx) * 48'(my)) >> 47 != 48'd0) n_shift++; else n_noshift++;
      // Carry of a half sum at the first Karatsuba level (32-bit operands).
      if (17'(mx[23:16]) + 17'(mx[15:0]) > 17'hffff ||
          17'(my[23:16]) + 17'(my[15:0]) > 17'hffff) n_kara_carry++;
    end
  endtask

  function automatic logic [31:0] rand_fp(input bit narrow);
    logic [31:0] r;
    r = $urandom;
    if (narrow) r[30:23] = 8'($urandom_range(100, 154));
    return r;
  endfunction

  task automatic cover_check(input string name, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end else begin
      $display("mechanism %-14s %0d", name, count);
    end
  endtask

  initial begin
    check(32'h3f80_0000, 32'h3f80_0000);   //  1.0   * 1.0    = 1.0
    check(32'h4000_0000, 32'h4040_0000);   //  2.0   * 3.0    = 6.0
    check(32'hc148_0000, 32'h4280_0000);   // -12.5  * 64.0   = -800.0
    check(32'h3fc0_0000, 32'h3fc0_0000);   //  1.5   * 1.5    = 2.25
    check(32'hbf80_0000, 32'hbf80_0000);   // -1.0   * -1.0   = 1.0
    check(32'h3fff_ffff, 32'h3fff_ffff);   // largest significands
    check(32'h7f7f_ffff, 32'h4000_0000);   // overflow
    check(32'h0080_0000, 32'h3f00_0000);   // underflow
    check(32'h0080_0000, 32'h3f80_0000);   // smallest normal stays normal
    check(32'h0000_0000, 32'h4120_0000);   // +0 * 10
    check(32'h8000_0000, 32'h4120_0000);   // -0 * 10
    check(32'h0000_0001, 32'h3f80_0000);   // subnormal read as zero
    check(32'h7f80_0000, 32'hc000_0000);   // inf * -2
    check(32'h7f80_0000, 32'h0000_0000);   // inf * 0
    check(32'h7fc0_1234, 32'h3f80_0000);   // NaN * 1
    check(32'h3f80_0000, 32'hff80_0001);   // 1 * NaN
    check(32'h3f7f_ffff, 32'h3f80_0001);   // product just below 1.0
    for (int k = 0; k < 30000; k++) check(rand_fp(k % 4 != 0), rand_fp(k % 5 != 0));
    cover_check("norm_shift",   n_shift);
    cover_check("norm_noshift", n_noshift);
    cover_check("overflow",     n_overflow);
    cover_check("underflow",    n_underflow);
    cover_check("zero_operand", n_zero);
    cover_check("inf_operand",  n_inf);
    cover_check("invalid",      n_invalid);
    cover_check("kara_carry",   n_kara_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
