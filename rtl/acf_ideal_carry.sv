// acf_ideal_carry: ideal carry functions c1(B) and c2(B).
//
// The two ideal carries estimate, from the multiplier B alone, the carry that
// the dropped minor truncated terms would have sent into the kept columns.
// c1 has weight 2^(N-W) (the lowest kept column) and c2 twice that. Each is a
// fixed Boolean function of the N bits of B, written here as a lookup of a
// 2^N entry truth table: bit B of C1_TABLE is c1(B), bit B of C2_TABLE is
// c2(B), with B read as an unsigned index. A synthesis tool reduces the table
// to two-level logic, as a Quine-McCluskey minimisation would.
//
// The tables come from an exhaustive search over all multiplicands for each
// B (see acf_pkg). Defaults are built in for N = 8 and N = 10 and every W in
// 1..3 and every method; for any other (N, W) pass C1_TABLE and C2_TABLE and
// set EXTERNAL_TABLE, or elaboration stops with an error.
//
// Purely combinational. That c1 and c2 depend on B only, their weights and
// the search criterion follow the design; the table form and bit order are
// this implementation's choice.
module acf_ideal_carry #(
  parameter int                  N              = 8,
  parameter int                  W              = 2,
  parameter acf_pkg::acf_method_e METHOD        = acf_pkg::ACF1,
  parameter bit                  EXTERNAL_TABLE = 1'b0,
  parameter logic [2**N-1:0]     C1_TABLE       = (2**N)'(acf_pkg::c1_default(N, W, METHOD)),
  parameter logic [2**N-1:0]     C2_TABLE       = (2**N)'(acf_pkg::c2_default(N, W, METHOD))
) (
  input  logic [N-1:0] b,   // multiplier, two's complement
  output logic         c1,  // ideal carry, weight 2^(N-W)
  output logic         c2   // ideal carry, weight 2^(N-W+1)
);
  if (!EXTERNAL_TABLE && !acf_pkg::has_builtin_table(N, W)) begin : g_no_table
    $error("acf_ideal_carry: no built-in carry table for this N and W; pass C1_TABLE/C2_TABLE");
  end

  always_comb begin
    c1 = C1_TABLE[b];
    c2 = C2_TABLE[b];
  end
endmodule
