// tb_urdhva_mult: exhaustive check of the 8 x 8 Urdhva Tiryagbhyam multiplier.
// Every operand pair (65,536 of them) is applied and the product compared
// with the integer product a*b. The multiplier is combinational: each result
// is checked 1 time unit after its operands are applied. A watchdog stops the
// run after a fixed number of clock cycles.
module tb_urdhva_mult;

  localparam int unsigned W = 8;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  logic           clk = 1'b0;
  int             checks = 0;
  int             failures = 0;

  urdhva_mult #(.W(W)) dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        a = W'(i);
        b = W'(j);
        #1;
        checks++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
