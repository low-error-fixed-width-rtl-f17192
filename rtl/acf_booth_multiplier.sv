// acf_booth_multiplier: N x N -> N fixed-width radix-4 Booth multiplier with
// approximate-carry-function (ACF) error compensation.
//
// The product of two N-bit two's-complement numbers is 2N bits wide; this
// unit returns only its upper N bits and never builds the lower half. Of the
// lower-half columns it keeps the W most significant ones (columns N-W..N-1)
// and drops the rest. The carry that the dropped bits would have produced is
// estimated as
//   {0, c2(B), c1(B)} + {cb3, cb2, cb1}
// added at column N-W: c1 and c2 are "ideal" carries, Boolean functions of
// the multiplier B chosen to minimise the summed absolute error, and cb are
// constant "base" carries fixed per method (ACF-1/2/3) and W.
//
// Structure:
//   fw_trunc_array   Booth encoders, partial-product rows, sum of kept bits
//   acf_ideal_carry  c1(B), c2(B)
//   acf_base_adder   adds the base carries -> cout1..cout4
//   acf_comp_adder   adds cout at column N-W, keeps columns N..2N-1
//
// Interface: a, b in, p out, all two's complement. Purely combinational:
// p is valid one propagation delay after a and b settle; there is no clock.
// Defaults N=8, W=2, ACF-1 are the configuration worked through in detail by
// the design; W = 1..3, ACF-1..3 and even N from 4 up are supported (tables
// for N other than 8 and 10 must be passed in).
module acf_booth_multiplier #(
  parameter int                   N              = 8,
  parameter int                   W              = 2,
  parameter acf_pkg::acf_method_e METHOD         = acf_pkg::ACF1,
  parameter bit                   EXTERNAL_TABLE = 1'b0,
  parameter logic [2**N-1:0]      C1_TABLE       = (2**N)'(acf_pkg::c1_default(N, W, METHOD)),
  parameter logic [2**N-1:0]      C2_TABLE       = (2**N)'(acf_pkg::c2_default(N, W, METHOD))
) (
  input  logic [N-1:0] a,   // multiplicand
  input  logic [N-1:0] b,   // multiplier
  output logic [N-1:0] p    // fixed-width product, weight 2^N per LSB
);
  logic [N+W-1:0] kept;
  logic           c1, c2;
  logic [3:0]     cout;

  fw_trunc_array #(.N(N), .W(W)) u_array (
    .a   (a),
    .b   (b),
    .kept(kept)
  );

  acf_ideal_carry #(
    .N(N), .W(W), .METHOD(METHOD), .EXTERNAL_TABLE(EXTERNAL_TABLE),
    .C1_TABLE(C1_TABLE), .C2_TABLE(C2_TABLE)
  ) u_ideal (
    .b (b),
    .c1(c1),
    .c2(c2)
  );

  acf_base_adder #(.W(W), .METHOD(METHOD)) u_base (
    .c1  (c1),
    .c2  (c2),
    .cout(cout)
  );

  acf_comp_adder #(.N(N), .W(W)) u_comp (
    .kept(kept),
    .cout(cout),
    .p   (p)
  );
endmodule
