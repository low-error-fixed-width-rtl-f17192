// booth_encoder: radix-4 Booth digit decoder for one partial-product row.
//
// Takes the overlapping multiplier triplet b[2i+1], b[2i], b[2i-1] and
// selects which multiple of the multiplicand the row carries:
//   000 -> 0     001 -> +A    010 -> +A    011 -> +2A
//   100 -> -2A   101 -> -A    110 -> -A    111 -> 0
// The selection is returned as three one-hot-style flags: one (|digit| = 1),
// two (|digit| = 2) and neg (the row is negated). For 111 the digit is zero
// and neg is left low, so the row and its +1 correction bit are both zero.
//
// Purely combinational, no clock. The mapping is the standard radix-4 Booth
// table; keeping neg low for the 111 code follows the partial-product table
// of the design (the zero row has a correction bit of 0).
module booth_encoder (
  input  logic               b_hi,   // b[2i+1]
  input  logic               b_mid,  // b[2i]
  input  logic               b_lo,   // b[2i-1] (0 for the first row)
  output acf_pkg::booth_sel_t sel
);
  always_comb begin
    sel.one = b_mid ^ b_lo;
    sel.two = (b_hi & ~b_mid & ~b_lo) | (~b_hi & b_mid & b_lo);
    sel.neg = b_hi & ~(b_mid & b_lo);
  end
endmodule
