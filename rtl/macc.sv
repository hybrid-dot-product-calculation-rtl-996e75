// MACC unit: one step of a dot-product chain.
//
// O = x + sel(i4 i3), where the 2-bit weight code (i4 i3) chooses the addend
// among 0, i2 (= A), i1 (= 2A) and i0 (= 3A or -A, chosen outside the unit by
// the layer's weight size). It is built the way the FPGA mapping works: per
// bit a single function of five inputs
//     f = ~i4 i3 i0 + i4 ~i3 i1 + i4 i3 i2
// gives the addend bit, the pair f / ~f selected by x gives the carry-chain
// propagate p = x ^ f, f itself is the generate g, and a ripple carry chain
// forms the sum bits. The structure and the function f follow the document;
// the width is a parameter (the document draws a 10-bit unit, O9..O0).
//
// Interface: x, i2, i1, i0 and o are two's-complement W-bit values; the
// caller sign-extends its operands to W bits. Purely combinational; the
// pipeline register behind it lives in the cell.
module macc #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] x,    // chain input (previous MACC or 0)
  input  logic         i4,   // weight code, high bit
  input  logic         i3,   // weight code, low bit
  input  logic [W-1:0] i2,   // A
  input  logic [W-1:0] i1,   // 2A
  input  logic [W-1:0] i0,   // 3A or -A
  output logic [W-1:0] o
);

  logic [W-1:0] f;     // addend bits
  logic [W-1:0] p;     // propagate
  logic [W-1:0] g;     // generate
  logic [W:0]   c;     // carries

  always_comb begin
    for (int b = 0; b < W; b++) begin
      f[b] = (~i4 & i3 & i0[b]) | (i4 & ~i3 & i1[b]) | (i4 & i3 & i2[b]);
      p[b] = x[b] ? ~f[b] : f[b];
      g[b] = f[b];
    end
  end

  // Carry chain: the carry passes where p is set, otherwise g starts one.
  assign c[0] = 1'b0;
  for (genvar b = 0; b < W; b++) begin : g_bit
    assign o[b]   = p[b] ^ c[b];
    assign c[b+1] = p[b] ? c[b] : g[b];
  end

endmodule
