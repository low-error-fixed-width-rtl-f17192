// tb_acf_ideal_carry: checks the ideal carry functions c1(B), c2(B).
// Eighteen instances cover N = 8 and N = 10 with W = 1..3 and ACF-1..3. For every multiplier B the testbench repeats the exhaustive
// search itself (acf_ref_pkg::best_carry: all multiplicands, all four
// (c2,c1) pairs, smallest summed absolute error) and compares the pair the
// unit returns. Combinational: sampled 1 ns after driving.
module tb_acf_ideal_carry;
  localparam int N = 8;
  localparam int N10 = 10;
  logic [N-1:0]   b;
  logic [N10-1:0] b10;
  logic [1:0] c [3][3];    // {c2,c1} per [W-1][METHOD-1]
  logic [1:0] c10 [3][3];
  int checks = 0, failures = 0;

  for (genvar w = 1; w <= 3; w++) begin : g_w
    for (genvar m = 1; m <= 3; m++) begin : g_m
      acf_ideal_carry #(.N(N), .W(w), .METHOD(acf_pkg::acf_method_e'(m))) dut (
        .b(b), .c1(c[w-1][m-1][0]), .c2(c[w-1][m-1][1]));
    end
  end
  for (genvar w = 1; w <= 3; w++) begin : g_w10
    for (genvar m = 1; m <= 3; m++) begin : g_m10
      acf_ideal_carry #(.N(N10), .W(w), .METHOD(acf_pkg::acf_method_e'(m))) dut (
        .b(b10), .c1(c10[w-1][m-1][0]), .c2(c10[w-1][m-1][1]));
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ones = 0;
    b10 = '0;
    for (int bu = 0; bu < (1 << N); bu++) begin
      b = N'(bu);
      #1;
      for (int w = 1; w <= 3; w++) begin
        for (int m = 1; m <= 3; m++) begin
          automatic int expd = acf_ref_pkg::best_carry(acf_ref_pkg::sval(longint'(bu), N), N, w, m);
          checks++;
          if (int'(c[w-1][m-1]) != expd) begin
            failures++;
            if (failures < 10) $display("FAIL N=8 W=%0d ACF-%0d B=%0d: {c2,c1}=%02b expected %02b",
                                        w, m, acf_ref_pkg::sval(longint'(bu), N), c[w-1][m-1], 2'(expd));
          end
          if (c[w-1][m-1] != 2'b00) ones++;
        end
      end
    end
    for (int bu = 0; bu < (1 << N10); bu++) begin
      b10 = N10'(bu);
      #1;
      for (int w = 1; w <= 3; w++) begin
        for (int m = 1; m <= 3; m++) begin
          automatic int expd = acf_ref_pkg::best_carry(acf_ref_pkg::sval(longint'(bu), N10), N10, w, m);
          checks++;
          if (int'(c10[w-1][m-1]) != expd) begin
            failures++;
            if (failures < 10) $display("FAIL N=10 W=%0d ACF-%0d B=%0d: {c2,c1}=%02b expected %02b",
                                        w, m, acf_ref_pkg::sval(longint'(bu), N10), c10[w-1][m-1], 2'(expd));
          end
        end
      end
    end
    // the search must select a non-zero carry for some B, or the test is vacuous
    checks++;
    if (ones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
