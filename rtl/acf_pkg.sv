// acf_pkg: types and constants shared by the fixed-width radix-4 Booth
// multiplier with approximate-carry-function (ACF) error compensation.
//
// What it holds:
//   * acf_method_e   - the three compensation variants ACF-1, ACF-2, ACF-3.
//   * booth_sel_t    - the decoded radix-4 Booth digit (negate / x1 / x2).
//   * base_carry()   - the fixed base carries {cb3,cb2,cb1} for each variant
//                      and each number w of kept truncated columns.
//   * c1_default(), c2_default()
//                    - the ideal carry functions c1(B) and c2(B), one bit per
//                      value of the multiplier B (bit index = B read as an
//                      unsigned N-bit number).
//
// How the ideal carry tables were obtained: for every multiplier value B and
// every choice (c2,c1) in {00,01,10,11}, the fixed-width product of the
// datapath in this package's modules is formed for all 2^N multiplicands A,
// with the compensation {0,c2,c1}+{cb3,cb2,cb1} added at column N-w. The
// choice with the smallest sum over A of |P_f*2^N - A*B| wins; on a tie the
// smaller {c2,c1} wins. The testbench tb_acf_ideal_carry repeats this search
// and checks every entry. Built-in tables exist for N = 8 and N = 10; for
// other operand lengths the tables are passed in as parameters.
//
// The base carries, the search criterion and the weights of c1 and c2 follow
// the method description; the tie rule and the bit order of the tables are
// this design's own choice.
package acf_pkg;

  typedef enum logic [1:0] {
    ACF1 = 2'd1,
    ACF2 = 2'd2,
    ACF3 = 2'd3
  } acf_method_e;

  // Decoded radix-4 Booth digit: value = (neg ? -1 : 1) * (one ? 1 : two ? 2 : 0)
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_sel_t;

  // Largest ideal-carry table held in this package (N = 10).
  localparam int TABLE_MAX = 1024;
  typedef logic [TABLE_MAX-1:0] carry_table_t;

  // Fixed base carries {cb3, cb2, cb1}, indexed by w (1..3) and method.
  function automatic logic [2:0] base_carry(int w, acf_method_e m);
    case (w)
      1: case (m) ACF1: return 3'b001; ACF2: return 3'b010; default: return 3'b011; endcase
      2: case (m) ACF1: return 3'b010; ACF2: return 3'b011; default: return 3'b100; endcase
      3: case (m) ACF1: return 3'b100; ACF2: return 3'b101; default: return 3'b110; endcase
      default: return 3'b000;
    endcase
  endfunction

  // True when this package holds the ideal carry tables for (n, w).
  function automatic bit has_builtin_table(int n, int w);
    return (n == 8 || n == 10) && w >= 1 && w <= 3;
  endfunction

  // Ideal carry tables: bit B is the carry for multiplier B (unsigned index).
  // Tables not listed are all zero.
  function automatic carry_table_t c1_default(int n, int w, acf_method_e m);
    if (n == 8 && w == 1 && m == ACF1) return carry_table_t'(256'h2efefffed113d1feff13d113d113d1fe2efefffefffeffec2efefffe2eec2e00);
    if (n == 8 && w == 1 && m == ACF2) return carry_table_t'(256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000);
    if (n == 8 && w == 2 && m == ACF1) return carry_table_t'(256'h2efefffe2eec2e002efefffe2eec2e002efefffe2eec2e002efefffe2eec2e00);
    if (n == 8 && w == 3 && m == ACF1) return carry_table_t'(256'h2efefffe2eec2e002efefffe2eec2e002efefffe2eec2e002efefffe2eec2e00);
    if (n == 10 && w == 1 && m == ACF1) return carry_table_t'({256'h2efefffed113d1feff13d113d113d1fed101000100010013d1010001d113d1fe,
        256'hff13d11300010013d101000100010013d101000100010013d1010001d113d1fe,
        256'h2efefffed113d1feff13d113d113d1feff13d113d113d1feff13d113fffeffec,
        256'h2efefffed113d1feff13d113d113d1fe2efefffefffeffec2efefffe2eec2e00});
    if (n == 10 && w == 1 && m == ACF2) return carry_table_t'({256'h000000002eec2e0000ec2eec2eec2e002efefffefffeffec2efefffe2eec2e00,
        256'h00ec2eecfffeffec2efefffefffeffec2efefffefffeffec2efefffe2eec2e00,
        256'h000000002eec2e0000ec2eec2eec2e0000ec2eec2eec2e0000ec2eec00000000,
        256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000});
    if (n == 10 && w == 2 && m == ACF1) return carry_table_t'({256'h2efefffed113d1feff13d113d113d1fe2efefffefffeffec2efefffe2eec2e00,
        256'h2efefffed113d1feff13d113d113d1fe2efefffefffeffec2efefffe2eec2e00,
        256'h2efefffed113d1feff13d113d113d1fe2efefffefffeffec2efefffe2eec2e00,
        256'h2efefffed113d1feff13d113d113d1fe2efefffefffeffec2efefffe2eec2e00});
    if (n == 10 && w == 2 && m == ACF2) return carry_table_t'({256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000,
        256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000,
        256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000,
        256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000});
    if (n == 10 && w == 3 && m == ACF1) return carry_table_t'({256'h2efefffed113d1feff13d113d113d1fe2efefffefffeffec2efefffe2eec2e00,
        256'h2efefffed113d1feff13d113d113d1fe2efefffefffeffec2efefffe2eec2e00,
        256'h2efefffed113d1feff13d113d113d1fe2efefffefffeffec2efefffe2eec2e00,
        256'h2efefffed113d1feff13d113d113d1fe2efefffefffeffec2efefffe2eec2e00});
    if (n == 10 && w == 3 && m == ACF2) return carry_table_t'({256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000,
        256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000,
        256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000,
        256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000});
    return '0;
  endfunction

  function automatic carry_table_t c2_default(int n, int w, acf_method_e m);
    if (n == 8 && w == 1 && m == ACF1) return carry_table_t'(256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000);
    if (n == 10 && w == 1 && m == ACF1) return carry_table_t'({256'h000000002eec2e0000ec2eec2eec2e002efefffefffeffec2efefffe2eec2e00,
        256'h00ec2eecfffeffec2efefffefffeffec2efefffefffeffec2efefffe2eec2e00,
        256'h000000002eec2e0000ec2eec2eec2e0000ec2eec2eec2e0000ec2eec00000000,
        256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000});
    if (n == 10 && w == 2 && m == ACF1) return carry_table_t'({256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000,
        256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000,
        256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000,
        256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000});
    if (n == 10 && w == 3 && m == ACF1) return carry_table_t'({256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000,
        256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000,
        256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000,
        256'h000000002eec2e0000ec2eec2eec2e0000000000000000000000000000000000});
    return '0;
  endfunction
endpackage
