// tb_acf_booth_multiplier: end-to-end test of the fixed-width multiplier at
// its default parameters (N = 8, W = 2, ACF-1), over all 65536 operand pairs.
//
// For every multiplier B the reference repeats the carry search
// (acf_ref_pkg::best_carry), then forms the expected fixed-width product
// arithmetically and compares it with p. It also accumulates the error
// against the exact product A*B (in units of 2^N) and checks the mean
// absolute error against 0.2592, the published figure for this
// configuration, and the largest error against 0.75.
//
// Mechanisms that must each occur at least once: every Booth digit value
// (-2, -1, 0, +1, +2) and the zero code 111, a negation bit landing in a kept
// column, ideal carry c1 both high and low, and the compensation changing
// the truncated result as well as leaving it unchanged.
// Combinational: sampled 1 ns after driving.
module tb_acf_booth_multiplier;
  localparam int N = 8;
  localparam int W = 2;
  logic [N-1:0] a, b, p;
  int checks = 0, failures = 0;

  // error statistics and mechanism counters
  longint sum_err = 0;
  longint sum_abs = 0;
  longint max_abs = 0;
  int n_digit [5] = '{default: 0};   // digits -2..+2
  int n_code111 = 0;
  int n_kept_neg = 0;
  int n_c1_hi = 0;
  int n_c1_lo = 0;
  int n_comp_up = 0;
  int n_comp_same = 0;
  real mean_abs, mean_err, max_err;

  acf_booth_multiplier dut (.a(a), .b(b), .p(p));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin

    for (int bu = 0; bu < (1 << N); bu++) begin
      automatic longint bv = acf_ref_pkg::sval(longint'(bu), N);
      automatic int k = acf_ref_pkg::best_carry(bv, N, W, 1);
      automatic int comp = acf_ref_pkg::base_ref(W, 1) + k;
      for (int au = 0; au < (1 << N); au++) begin
        automatic longint av = acf_ref_pkg::sval(longint'(au), N);
        longint expd, e;
        a = N'(au);
        b = N'(bu);
        #1;
        expd = acf_ref_pkg::fw_product(av, bv, N, W, comp);
        checks++;
        if (acf_ref_pkg::sval(longint'(p), N) != expd) begin
          failures++;
          if (failures < 10) $display("FAIL A=%0d B=%0d: p=%0d expected %0d", av, bv,
                                      acf_ref_pkg::sval(longint'(p), N), expd);
        end
        e = (acf_ref_pkg::sval(longint'(p), N) <<< N) - av * bv;
        sum_err += e;
        sum_abs += (e < 0) ? -e : e;
        if (((e < 0) ? -e : e) > max_abs) max_abs = (e < 0) ? -e : e;

        // mechanism counters, observed inside the design
        for (int i = 0; i < N/2; i++) begin
          automatic int d = acf_ref_pkg::digit(bv, i);
          n_digit[d+2]++;
          if (d == 0 && b[2*i+1] && b[2*i] && (i > 0 && b[2*i-1])) n_code111++;
        end
        if (dut.u_array.nbit[N/2-1]) n_kept_neg++;
        if (dut.u_ideal.c1) n_c1_hi++; else n_c1_lo++;
        if (p != N'(dut.u_array.kept >> W)) n_comp_up++; else n_comp_same++;
      end
    end

    mean_abs = real'(sum_abs) / 65536.0 / 256.0;
    mean_err = real'(sum_err) / 65536.0 / 256.0;
    max_err  = real'(max_abs) / 256.0;
    $display("N=8 W=2 ACF-1: mean error %.4f  mean |error| %.4f  max |error| %.4f (LSB of P_f)",
             mean_err, mean_abs, max_err);
    checks++;
    if (mean_abs < 0.25915 || mean_abs > 0.25925) begin
      failures++;
      $display("FAIL mean |error| %.5f, expected 0.2592", mean_abs);
    end
    checks++;
    if (max_abs != 192) begin
      failures++;
      $display("FAIL max |error| %.4f, expected 0.7500", max_err);
    end

    $display("digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d  code111:%0d  kept n_i:%0d  c1 hi/lo:%0d/%0d  comp changed/unchanged:%0d/%0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4], n_code111, n_kept_neg,
             n_c1_hi, n_c1_lo, n_comp_up, n_comp_same);
    for (int j = 0; j < 5; j++) begin
      checks++;
      if (n_digit[j] == 0) failures++;
    end
    checks++; if (n_code111 == 0)   begin failures++; $display("FAIL code 111 never seen"); end
    checks++; if (n_kept_neg == 0)  begin failures++; $display("FAIL kept n_i never set"); end
    checks++; if (n_c1_hi == 0)     begin failures++; $display("FAIL c1 never high"); end
    checks++; if (n_c1_lo == 0)     begin failures++; $display("FAIL c1 never low"); end
    checks++; if (n_comp_up == 0)   begin failures++; $display("FAIL compensation never changed p"); end
    checks++; if (n_comp_same == 0) begin failures++; $display("FAIL compensation always changed p"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
