// urdhva_mult: W x W unsigned multiplier by the Urdhva Tiryagbhyam
// ("vertically and crosswise") column method.
//
// For every product column k the crosswise bit products a[i]&b[j] with
// i + j = k are counted; the count is added to the carry left over from column
// k-1, the low bit of that total is product bit k and the rest moves on as the
// carry into column k+1. This is the column-by-column procedure of the
// vertical-and-crosswise method (shown in decimal for 232 x 323 in the source
// description) applied to binary digits. After the last column (2W-2) the
// remaining carry is product bit 2W-1.
//
// Interface: a, b (W bits) in, p = a*b (2W bits) out. Purely combinational.
// The 8-bit default is the operand width at which the Karatsuba recursion
// stops; counting columns in sequence with a carry is this design's literal
// reading of the method, and a synthesis tool is free to restructure it.
module urdhva_mult #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  // A column holds at most W ones and the incoming carry stays below W, so
  // the running total fits in clog2(2W)+1 bits.
  localparam int unsigned CW = $clog2(2 * W) + 1;

  always_comb begin
    logic [CW-1:0] col;
    logic [CW-1:0] total;
    logic [CW-1:0] carry;
    p     = '0;
    carry = '0;
    for (int k = 0; k < 2 * W - 1; k++) begin
      col = '0;
      for (int i = 0; i < W; i++) begin
        if (k - i >= 0 && k - i < W) begin
          col = col + CW'(a[i] & b[k-i]);
        end
      end
      total = col + carry;
      p[k]  = total[0];
      carry = total >> 1;
    end
    p[2*W-1] = carry[0];
  end

endmodule
