// tb_normalizer: checks normalisation and exponent update. Random 48-bit
// products in [2^46, 2^48) are applied with random exponents from the range
// the exponent adder can produce (-127 to 383). The expected fraction is the
// 23 bits below the leading one (found by scanning for it) and the expected
// exponent is e_in plus the position of the leading one above bit 46. Both
// the shifted and the unshifted case are counted and each must occur.
// Combinational: checked 1 time unit after the inputs. A watchdog stops the
// run after a fixed number of cycles.
module tb_normalizer;

  logic [47:0]       prod;
  logic signed [9:0] e_in, e_out;
  logic [22:0]       frac;
  logic              shifted;
  logic              clk = 1'b0;
  int                checks = 0;
  int                failures = 0;
  int                n_shift = 0;
  int                n_noshift = 0;

  normalizer dut (.prod(prod), .e_in(e_in), .frac(frac), .e_out(e_out), .shifted(shifted));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [47:0] x, input logic signed [9:0] e);
    int          lead;
    logic [22:0] exp_frac;
    prod = x;
    e_in = e;
    #1;
    lead = 0;
    for (int i = 0; i < 48; i++) if (x[i]) lead = i;
    exp_frac = 23'(x >> (lead - 23));
    checks++;
    if (frac !== exp_frac || int'(e_out) != int'(e) + lead - 46) begin
      failures++;
      if (failures < 10) $display("FAIL %h e=%0d: got %h %0d", x, e, frac, e_out);
    end
    if (lead == 47) n_shift++; else n_noshift++;
  endtask

  initial begin
    check(48'h4000_0000_0000, 10'sd1);
    check(48'hffff_ffff_ffff, 10'sd254);
    check(48'h7fff_ffff_ffff, -10'sd127);
    check(48'h8000_0000_0000, 10'sd383);
    for (int k = 0; k < 20000; k++) begin
      logic [47:0] x;
      x = {16'($urandom), $urandom};
      x[47:46] = (x[47] == 1'b0) ? 2'b01 : x[47:46];
      check(x, 10'($urandom_range(0, 510)) - 10'sd127);
    end
    checks++;
    if (n_shift == 0 || n_noshift == 0) begin
      failures++;
      $display("FAIL coverage: shifted=%0d unshifted=%0d", n_shift, n_noshift);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
