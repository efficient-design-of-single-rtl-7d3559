// kogge_stone_adder: WIDTH-bit parallel-prefix adder with carry in and out.
//
// Bit i first forms generate g = a&b and propagate p = a^b. Then
// clog2(WIDTH) prefix stages follow; stage s combines each bit with the bit
// 2^s places below it (black cell: G = Gi | Pi&Gj, P = Pi&Pj). Bits with no
// partner that far below pass their pair through unchanged, as the buffers of
// the Kogge-Stone tree do. After the last stage bit i holds the group
// generate/propagate of bits i..0; the carry into bit i+1 is then
// G[i] | P[i]&cin, and sum = p ^ carries.
//
// The tree follows the Kogge-Stone structure of the source description; the
// carry-in is this design's addition so that the same adder can subtract
// (a + ~b + 1) and increment (b = 0, cin = 1) on the exponent path.
//
// Interface: a, b (WIDTH bits), cin in; sum (WIDTH bits), cout out.
// Purely combinational, depth clog2(WIDTH) prefix cells.
module kogge_stone_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned STAGES = $clog2(WIDTH);

  logic [STAGES:0][WIDTH-1:0] gg;   // group generate after each stage
  logic [STAGES:0][WIDTH-1:0] pp;   // group propagate after each stage
  logic [WIDTH:0]             carry;

  assign gg[0] = a & b;
  assign pp[0] = a ^ b;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i >= (1 << s)) begin : g_cell
        assign gg[s+1][i] = gg[s][i] | (pp[s][i] & gg[s][i-(1<<s)]);
        assign pp[s+1][i] = pp[s][i] & pp[s][i-(1<<s)];
      end else begin : g_buf
        assign gg[s+1][i] = gg[s][i];
        assign pp[s+1][i] = pp[s][i];
      end
    end
  end

  assign carry[0] = cin;
  assign carry[WIDTH:1] = gg[STAGES] | (pp[STAGES] & {WIDTH{cin}});

  assign sum  = pp[0] ^ carry[WIDTH-1:0];
  assign cout = carry[WIDTH];

endmodule
