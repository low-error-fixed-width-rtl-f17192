// booth_pp_row: one row of the radix-4 Booth partial-product array.
//
// Forms the N+1 bit row pp[N:0] for a decoded Booth digit:
//   +A  -> {a[N-1], a}        (sign-extended by one bit)
//   +2A -> {a, 1'b0}
//   0   -> all zeros
//   -A / -2A -> the bitwise inverse of the above, with n = 1
// The row read as a signed N+1 bit number plus the correction bit n equals
// digit * A. The array places row i at column 2i and its n bit at column 2i.
//
// Purely combinational. The bit layout follows the partial-product table of
// the design; negation by inversion plus a separate +1 bit is that table's
// scheme.
module booth_pp_row #(
  parameter int N = 8
) (
  input  logic [N-1:0]        a,    // multiplicand, two's complement
  input  acf_pkg::booth_sel_t sel,
  output logic [N:0]          pp,   // pp[j] is pp_{j,i} of the array
  output logic                n     // +1 correction for a negated row
);
  logic [N:0] mag;

  always_comb begin
    if (sel.one)      mag = {a[N-1], a};
    else if (sel.two) mag = {a, 1'b0};
    else              mag = '0;
    pp = mag ^ {(N+1){sel.neg}};
    n  = sel.neg;
  end
endmodule
