// tb_acf_external_table: checks the multiplier at an operand width that has
// no built-in ideal-carry table (N = 6, W = 2, ACF-1, and N = 6, W = 1,
// ACF-2), with the tables passed in through C1_TABLE / C2_TABLE and
// EXTERNAL_TABLE = 1.
//
// The tables are computed at elaboration by a constant function that runs
// the same exhaustive search as the reference model (acf_ref_pkg::best_carry).
// All 4096 operand pairs are applied and each result is compared with the
// arithmetic model; the mean absolute error must lie between exact rounding
// (0.25 LSB) and the uncompensated truncation of the same array.
// Combinational: sampled 1 unit after driving.
module tb_acf_external_table;
  localparam int N = 6;

  function automatic logic [2**N-1:0] make_table(int w, int m, int which);
    logic [2**N-1:0] t = '0;
    for (int bu = 0; bu < 2**N; bu++) begin
      int k = acf_ref_pkg::best_carry(acf_ref_pkg::sval(longint'(bu), N), N, w, m);
      t[bu] = (which == 2) ? k[1] : k[0];
    end
    return t;
  endfunction

  localparam logic [2**N-1:0] T1_W2 = make_table(2, 1, 1);
  localparam logic [2**N-1:0] T2_W2 = make_table(2, 1, 2);
  localparam logic [2**N-1:0] T1_W1 = make_table(1, 2, 1);
  localparam logic [2**N-1:0] T2_W1 = make_table(1, 2, 2);

  logic [N-1:0] a, b, p_w2, p_w1;
  int checks = 0, failures = 0;
  longint sum_abs_w2 = 0;
  longint sum_abs_dt = 0;

  acf_booth_multiplier #(.N(N), .W(2), .METHOD(acf_pkg::ACF1), .EXTERNAL_TABLE(1'b1),
                         .C1_TABLE(T1_W2), .C2_TABLE(T2_W2)) dut_w2 (.a(a), .b(b), .p(p_w2));
  acf_booth_multiplier #(.N(N), .W(1), .METHOD(acf_pkg::ACF2), .EXTERNAL_TABLE(1'b1),
                         .C1_TABLE(T1_W1), .C2_TABLE(T2_W1)) dut_w1 (.a(a), .b(b), .p(p_w1));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int bu = 0; bu < 2**N; bu++) begin
      automatic longint bv = acf_ref_pkg::sval(longint'(bu), N);
      automatic int comp2 = acf_ref_pkg::base_ref(2, 1) + acf_ref_pkg::best_carry(bv, N, 2, 1);
      automatic int comp1 = acf_ref_pkg::base_ref(1, 2) + acf_ref_pkg::best_carry(bv, N, 1, 2);
      for (int au = 0; au < 2**N; au++) begin
        automatic longint av = acf_ref_pkg::sval(longint'(au), N);
        automatic longint e2, e1, edt;
        a = N'(au);
        b = N'(bu);
        #1;
        e2 = acf_ref_pkg::fw_product(av, bv, N, 2, comp2);
        e1 = acf_ref_pkg::fw_product(av, bv, N, 1, comp1);
        checks += 2;
        if (acf_ref_pkg::sval(longint'(p_w2), N) != e2) begin
          failures++;
          if (failures < 10) $display("FAIL W=2 A=%0d B=%0d: p=%0d expected %0d", av, bv, p_w2, e2);
        end
        if (acf_ref_pkg::sval(longint'(p_w1), N) != e1) begin
          failures++;
          if (failures < 10) $display("FAIL W=1 A=%0d B=%0d: p=%0d expected %0d", av, bv, p_w1, e1);
        end
        e2  = (acf_ref_pkg::sval(longint'(p_w2), N) <<< N) - av * bv;
        edt = (acf_ref_pkg::fw_product(av, bv, N, 2, 0) <<< N) - av * bv;
        sum_abs_w2 += (e2 < 0) ? -e2 : e2;
        sum_abs_dt += (edt < 0) ? -edt : edt;
      end
    end
    $display("N=6 W=2 ACF-1: mean |error| %.4f, same array uncompensated %.4f",
             real'(sum_abs_w2) / 4096.0 / 64.0, real'(sum_abs_dt) / 4096.0 / 64.0);
    checks += 2;
    if (sum_abs_w2 < 4096 * 16) failures++;     // below 0.25 LSB would beat exact rounding
    if (sum_abs_w2 >= sum_abs_dt) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
