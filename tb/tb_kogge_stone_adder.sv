// tb_kogge_stone_adder: checks the Kogge-Stone adder at its default 8-bit
// width exhaustively (all a, b and carry-in, 131,072 cases) and a 16-bit
// instance, the size of the drawn prefix tree, on 20,000 random cases plus
// full-length carry chains. Reference: integer a + b + cin. Combinational:
// each result is checked 1 time unit after its operands. A watchdog stops
// the run after a fixed number of cycles.
module tb_kogge_stone_adder;

  logic [7:0]  a8, b8, s8;
  logic        c8, co8;
  logic [15:0] a16, b16, s16;
  logic        c16, co16;
  logic        clk = 1'b0;
  int          checks = 0;
  int          failures = 0;

  kogge_stone_adder dut8 (.a(a8), .b(b8), .cin(c8), .sum(s8), .cout(co8));
  kogge_stone_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] expected;
    a16 = x; b16 = y; c16 = c;
    #1;
    expected = 17'(x) + 17'(y) + 17'(c);
    checks++;
    if ({co16, s16} !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL16 %h + %h + %b: got %h", x, y, c, {co16, s16});
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(i); b8 = 8'(j); c8 = 1'(c);
          #1;
          checks++;
          if ({co8, s8} !== 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL8 %0d + %0d + %0d: got %0d", i, j, c, {co8, s8});
          end
        end
      end
    end
    check16(16'hffff, 16'h0000, 1'b1);
    check16(16'h7fff, 16'h0001, 1'b0);
    check16(16'haaaa, 16'h5555, 1'b1);
    check16(16'hffff, 16'hffff, 1'b1);
    for (int k = 0; k < 20000; k++) check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
