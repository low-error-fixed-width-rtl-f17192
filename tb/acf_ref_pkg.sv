// acf_ref_pkg: arithmetic reference model of the ACF fixed-width Booth
// multiplier, used by the testbenches.
//
// Everything here is written with integer arithmetic on the operand values
// rather than with bit patterns, so it checks the RTL independently:
//   digit()       radix-4 Booth digit of group i: -2*b[2i+1] + b[2i] + b[2i-1]
//   trunc_sum()   sum of the partial-product bits in columns >= N-W, exact
//   fw_product()  fixed-width product for a given compensation word
//   best_carry()  exhaustive search over all multiplicands for the (c2,c1)
//                 pair with the smallest summed absolute error (ties: lower)
//   base_ref()    the base carries {cb3,cb2,cb1} per W and method
package acf_ref_pkg;

  function automatic longint sval(longint v, int n);
    longint m = longint'(1) << n;
    v = v & (m - 1);
    return (v >= (m >> 1)) ? v - m : v;
  endfunction

  function automatic int digit(longint b, int i);
    longint bu = b & ((longint'(1) << 62) - 1);
    int hi = int'((bu >> (2*i+1)) & 1);
    int md = int'((bu >> (2*i)) & 1);
    int lo = (i == 0) ? 0 : int'((bu >> (2*i-1)) & 1);
    return -2*hi + md + lo;
  endfunction

  // Exact sum of the bits of the kept columns (>= N-W), as a multiple of 2^(N-W).
  // A negated row is its ones' complement (d*A - 1) plus a correction 1 at column 2i.
  function automatic longint trunc_sum(longint a, longint b, int n, int w);
    int     lo = n - w;
    longint s  = 0;
    for (int i = 0; i < n/2; i++) begin
      int     d   = digit(b, i);
      longint row = (d < 0) ? longint'(d) * a - 1 : longint'(d) * a;
      s += ((row <<< (2*i)) >>> lo) <<< lo;   // floor to a multiple of 2^lo
      if (d < 0 && 2*i >= lo) s += longint'(1) << (2*i);
    end
    return s;
  endfunction

  function automatic longint fw_product(longint a, longint b, int n, int w, int comp);
    return (trunc_sum(a, b, n, w) + (longint'(comp) << (n - w))) >>> n;
  endfunction

  function automatic int base_ref(int w, int method);
    // Base carries {cb3,cb2,cb1} as a number: w = 1: 1,2,3; w = 2: 2,3,4; w = 3: 4,5,6
    case (w)
      1: return method;
      2: return method + 1;
      3: return method + 3;
      default: return 0;
    endcase
  endfunction

  // Returns {c2,c1} minimising sum over all A of |P_f*2^N - A*B|.
  function automatic int best_carry(longint b, int n, int w, int method);
    longint best_err = -1;
    int     best_k   = 0;
    for (int k = 0; k < 4; k++) begin
      longint err = 0;
      int comp = base_ref(w, method) + k;   // {0,c2,c1} + base
      for (longint au = 0; au < (longint'(1) << n); au++) begin
        longint a = sval(au, n);
        longint e = (fw_product(a, b, n, w, comp) <<< n) - a * b;
        err += (e < 0) ? -e : e;
      end
      if (best_err < 0 || err < best_err) begin
        best_err = err;
        best_k   = k;
      end
    end
    return best_k;
  endfunction

endpackage
