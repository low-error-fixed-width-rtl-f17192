// acf_base_adder: adds the fixed base carries to the ideal carries.
//
// Forms the compensation word
//   {cout4, cout3, cout2, cout1} = {0, c2, c1} + {cb3, cb2, cb1}
// where {cb3, cb2, cb1} is the constant base carry of the chosen method
// (ACF-1, ACF-2 or ACF-3) for W kept truncated columns:
//   W=1: 001 / 010 / 011    W=2: 010 / 011 / 100    W=3: 100 / 101 / 110
// Because the base is a constant, the adder collapses to a few gates.
// cout1 lands in column N-W, cout2 in N-W+1, and so on.
//
// Purely combinational. The base values and the sum follow the design.
module acf_base_adder #(
  parameter int                   W      = 2,
  parameter acf_pkg::acf_method_e METHOD = acf_pkg::ACF1
) (
  input  logic       c1,
  input  logic       c2,
  output logic [3:0] cout   // cout[0] = cout1 ... cout[3] = cout4
);
  localparam logic [2:0] BASE = acf_pkg::base_carry(W, METHOD);

  always_comb cout = {2'b00, c2, c1} + {1'b0, BASE};

  initial begin
    assert (W >= 1 && W <= 3) else $error("acf_base_adder: base carries exist for W = 1..3 only");
  end
endmodule
