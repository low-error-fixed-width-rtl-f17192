// acf_comp_adder: final compensated addition and truncation.
//
// Adds the compensation word cout (cout1 at column N-W, cout2 at N-W+1, ...)
// to the kept columns of the truncated partial-product sum, then drops the W
// truncated columns. What remains, columns N .. 2N-1, is the N-bit
// fixed-width product P_f (the upper half of A x B, compensated).
// kept[0] has weight 2^(N-W), so cout is added at bit 0.
//
// Purely combinational. The column each carry enters follows the design's
// carry-to-column mapping; a result outside the N-bit range wraps.
module acf_comp_adder #(
  parameter int N = 8,
  parameter int W = 2
) (
  input  logic [N+W-1:0] kept,  // columns N-W .. 2N-1 of the truncated sum
  input  logic [3:0]     cout,  // compensation carries
  output logic [N-1:0]   p      // fixed-width product
);
  always_comb p = N'((kept + (N+W)'(cout)) >> W);
endmodule
