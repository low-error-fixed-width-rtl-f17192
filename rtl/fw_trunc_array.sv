// fw_trunc_array: truncated radix-4 Booth partial-product array.
//
// Builds the N/2 Booth rows of A x B and sums only the bits that sit in
// columns N-W and above: the main part (columns N .. 2N-1, which become the
// fixed-width product) and the W most significant columns of the truncated
// part (columns N-W .. N-1, the "major" truncated terms). All bits below
// column N-W (the "minor" truncated terms) are dropped; their expected carry
// into column N-W is supplied separately by the ACF compensation logic.
//
// Row i (N+1 bits, sign-extended) sits at column 2i; its negation bit n_i also
// sits at column 2i and is kept only when 2i >= N-W. The output kept[] holds
// columns N-W .. 2N-1 of the sum, so kept[0] has weight 2^(N-W); it is exact
// modulo 2^(N+W), which is all the fixed-width result needs.
//
// Purely combinational. The row layout, the split into main, major and minor
// parts and the choice of W columns follow the design; the document leaves the
// reduction tree open, so the rows are summed with a plain adder chain and the
// synthesis tool is left to build the tree.
module fw_trunc_array #(
  parameter int N = 8,  // operand width, even
  parameter int W = 2   // truncated columns kept (1..N)
) (
  input  logic [N-1:0]   a,     // multiplicand, two's complement
  input  logic [N-1:0]   b,     // multiplier, two's complement
  output logic [N+W-1:0] kept   // columns N-W .. 2N-1 of the truncated sum
);
  localparam int ROWS = N / 2;
  localparam int LO   = N - W;   // lowest kept column

  acf_pkg::booth_sel_t sel [ROWS];
  logic [N:0]          pp  [ROWS];
  logic [ROWS-1:0]     nbit;

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    booth_encoder u_enc (
      .b_hi (b[2*i+1]),
      .b_mid(b[2*i]),
      .b_lo ((i == 0) ? 1'b0 : b[(i == 0) ? 0 : 2*i-1]),
      .sel  (sel[i])
    );
    booth_pp_row #(.N(N)) u_pp (
      .a  (a),
      .sel(sel[i]),
      .pp (pp[i]),
      .n  (nbit[i])
    );
  end

  always_comb begin
    kept = '0;
    for (int i = 0; i < ROWS; i++) begin
      // sign-extend the row, move it to column 2i, then drop columns below LO
      kept = kept + (N+W)'(((2*N)'(signed'(pp[i])) <<< (2*i)) >>> LO);
      if (2*i >= LO) kept = kept + ((N+W)'(nbit[i]) << (2*i - LO));
    end
  end

  initial begin
    assert (N % 2 == 0) else $error("fw_trunc_array: N must be even");
    assert (W >= 1 && W <= N) else $error("fw_trunc_array: W out of range");
  end
endmodule
