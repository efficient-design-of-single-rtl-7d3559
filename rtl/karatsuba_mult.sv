// karatsuba_mult: N x N unsigned multiplier, Karatsuba recursion over
// Urdhva Tiryagbhyam leaves.
//
// Each operand is split into a high half and a low half of H = N/2 bits:
//   X = Xh*2^H + Xl,  Y = Yh*2^H + Yl
//   X*Y = Xh*Yh*2^N + ((Xh+Xl)*(Yh+Yl) - Xh*Yh - Xl*Yl)*2^H + Xl*Yl
// so one level needs three H-bit products instead of four. The three products
// are built by this module again until the operands are LEAF bits or fewer,
// where urdhva_mult does the multiplication. With the defaults (N = 32,
// LEAF = 8) there are two Karatsuba levels and nine 8 x 8 Urdhva multipliers.
//
// The half sums Xh+Xl and Yh+Yl are H+1 bits wide. To keep every leaf at LEAF
// bits (rather than LEAF+1) the middle product is taken on the low H bits of
// the sums and the carry bits cx, cy are folded in afterwards:
//   (cx*2^H + sx)(cy*2^H + sy) = sx*sy + (cx*sy + cy*sx)*2^H + cx*cy*2^(2H)
// This correction is a choice of this design; the three-product split, the
// subtracter, the shifts and the final adder follow the Karatsuba block
// diagram. N must halve evenly down to LEAF or below.
//
// Interface: a, b (N bits) in, p = a*b (2N bits) out. Purely combinational.
//
// The Verilator linter reports p_hh, p_ll and p_ss as undriven, once per run
// whatever N is. The warning stands: it comes from the placeholder copy the
// tool keeps of a self-instantiating module, not from an elaborated level;
// every elaborated level drives the three signals from its sub-multipliers,
// and the exhaustive and random tests of the product confirm it.
module karatsuba_mult #(
  parameter int unsigned N    = 32,
  parameter int unsigned LEAF = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  if (N <= LEAF) begin : g_leaf

    urdhva_mult #(.W(N)) u_urdhva (.a(a), .b(b), .p(p));

  end else begin : g_split

    if (N % 2 != 0) begin : g_bad_width
      $error("karatsuba_mult: N=%0d cannot be halved evenly", N);
    end

    localparam int unsigned H = N / 2;

    logic [H-1:0]   xh, xl, yh, yl;
    logic [H:0]     xs, ys;          // half sums, one bit wider
    logic [2*H-1:0] p_hh, p_ll, p_ss;
    logic [2*H+1:0] p_mid;           // (Xh+Xl)*(Yh+Yl), full width
    logic [2*H+1:0] p_cross;         // Xh*Yl + Xl*Yh

    assign {xh, xl} = a;
    assign {yh, yl} = b;
    assign xs = {1'b0, xh} + {1'b0, xl};
    assign ys = {1'b0, yh} + {1'b0, yl};

    karatsuba_mult #(.N(H), .LEAF(LEAF)) u_hh (.a(xh),        .b(yh),        .p(p_hh));
    karatsuba_mult #(.N(H), .LEAF(LEAF)) u_ll (.a(xl),        .b(yl),        .p(p_ll));
    karatsuba_mult #(.N(H), .LEAF(LEAF)) u_ss (.a(xs[H-1:0]), .b(ys[H-1:0]), .p(p_ss));

    // Fold the carry bits of the half sums back into the middle product.
    always_comb begin
      p_mid = (2*H+2)'(p_ss);
      if (xs[H]) p_mid = p_mid + ((2*H+2)'(ys[H-1:0]) << H);
      if (ys[H]) p_mid = p_mid + ((2*H+2)'(xs[H-1:0]) << H);
      if (xs[H] && ys[H]) p_mid = p_mid + ((2*H+2)'(1) << (2*H));
    end

    // Subtracter, shifts and final adder.
    assign p_cross = p_mid - (2*H+2)'(p_hh) - (2*H+2)'(p_ll);
    assign p = ((2*N)'(p_hh) << N) + ((2*N)'(p_cross) << H) + (2*N)'(p_ll);

  end

endmodule
