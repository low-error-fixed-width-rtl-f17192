// tb_acf_base_adder: checks {cout4..cout1} = {0,c2,c1} + {cb3,cb2,cb1} for
// all nine combinations of W = 1..3 and ACF-1..3 and all four (c2,c1) inputs.
// The base carries are the reference table in acf_ref_pkg.
// Combinational: sampled 1 ns after driving.
module tb_acf_base_adder;
  logic c1, c2;
  logic [3:0] cout [3][3];
  int checks = 0, failures = 0;

  for (genvar w = 1; w <= 3; w++) begin : g_w
    for (genvar m = 1; m <= 3; m++) begin : g_m
      acf_base_adder #(.W(w), .METHOD(acf_pkg::acf_method_e'(m))) dut (
        .c1(c1), .c2(c2), .cout(cout[w-1][m-1]));
    end
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      {c2, c1} = 2'(k);
      #1;
      for (int w = 1; w <= 3; w++) begin
        for (int m = 1; m <= 3; m++) begin
          automatic int expd = acf_ref_pkg::base_ref(w, m) + 2*int'(c2) + int'(c1);
          checks++;
          if (int'(cout[w-1][m-1]) != expd) begin
            failures++;
            $display("FAIL W=%0d ACF-%0d c2c1=%0b%0b: cout=%0d expected %0d", w, m, c2, c1,
                     cout[w-1][m-1], expd);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
