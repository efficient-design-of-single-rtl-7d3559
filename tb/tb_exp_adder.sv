// tb_exp_adder: exhaustive check of the exponent path (sum of the two biased
// exponents minus the bias 127) over all 65,536 exponent pairs, against the
// integer ea + eb - 127 as a signed 10-bit value. Combinational: each result
// is checked 1 time unit after its operands. A watchdog stops the run.
module tb_exp_adder;

  logic [7:0]        ea, eb;
  logic signed [9:0] e_sum;
  logic              clk = 1'b0;
  int                checks = 0;
  int                failures = 0;

  exp_adder dut (.ea(ea), .eb(eb), .e_sum(e_sum));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        ea = 8'(i);
        eb = 8'(j);
        #1;
        checks++;
        if (int'(e_sum) != i + j - 127) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d - 127: got %0d", i, j, e_sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
