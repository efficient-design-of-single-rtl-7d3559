// tb_karatsuba_mult: checks the 32 x 32 Karatsuba-Urdhva multiplier at its
// default size against the simulator's own 64-bit multiplication.
// Directed operands set the half-sum carry bits, alone and together, at both
// recursion levels (all-ones halves, single high bits, zero); then 50,000
// random pairs follow, a third of them limited to 24 bits as the multiplier's
// significands are. Combinational: each result is checked 1 time unit after
// its operands. A watchdog stops the run after a fixed number of cycles.
module tb_karatsuba_mult;

  localparam int unsigned N = 32;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  logic           clk = 1'b0;
  int             checks = 0;
  int             failures = 0;

  karatsuba_mult #(.N(N), .LEAF(8)) dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] expected;
    a = x;
    b = y;
    #1;
    expected = 64'(x) * 64'(y);
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h expected %h", x, y, p, expected);
    end
  endtask

  localparam logic [N-1:0] DIRECTED [10] = '{
    32'h0000_0000, 32'hffff_ffff, 32'hffff_0000, 32'h0000_ffff, 32'h8000_8000,
    32'hff00_ff00, 32'h00ff_00ff, 32'h8080_8080, 32'h00ff_ffff, 32'h0080_0000
  };

  initial begin
    foreach (DIRECTED[i]) begin
      foreach (DIRECTED[j]) check(DIRECTED[i], DIRECTED[j]);
    end
    for (int k = 0; k < 50000; k++) begin
      if (k % 3 == 0) check({8'h00, 1'b1, 23'($urandom)}, {8'h00, 1'b1, 23'($urandom)});
      else            check($urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
