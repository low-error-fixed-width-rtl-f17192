// tb_acf_accuracy: exhaustive accuracy run of the fixed-width multiplier.
//
// Builds eighteen multipliers - N = 8 and N = 10, W = 1..3, ACF-1..3 - and
// applies every operand pair (65536 at N = 8, 1048576 at N = 10). For each it
// measures, in units of the output LSB (2^N):
//   mean error       mean of P_f*2^N - A*B
//   max |error|      largest |P_f*2^N - A*B|
//   mean |error|     mean of |P_f*2^N - A*B|
// and checks them against the values of an independent arithmetic model of
// the same datapath (to 4 decimals). The published mean-|error| figure for
// each configuration is printed next to the measured one for comparison.
// Combinational: sampled 1 unit after driving.
module tb_acf_accuracy;
  logic [7:0] a8, b8;
  logic [9:0] a10, b10;
  logic [7:0] p8  [3][3];
  logic [9:0] p10 [3][3];
  int checks = 0, failures = 0;

  longint sum_e  [2][3][3];
  longint sum_a  [2][3][3];
  longint max_a  [2][3][3];

  // model values, [N=8/10][W-1][METHOD-1]
  real exp_mean [2][3][3] = '{'{'{-0.0078, 0.0781, 0.4980}, '{-0.0049, 0.0908, 0.3447}, '{-0.0020, 0.0449, 0.1699}},
                              '{'{-0.0039, 0.0288, 0.3120}, '{-0.0032, 0.0383, 0.2502}, '{-0.0015, 0.0190, 0.1245}}};
  real exp_max  [2][3][3] = '{'{'{1.1680, 1.1680, 1.5000}, '{0.7500, 0.7500, 1.0000}, '{0.6250, 0.6250, 0.7500}},
                              '{'{1.5000, 1.5000, 1.5000}, '{0.9170, 0.9170, 1.0000}, '{0.6670, 0.6670, 0.7500}}};
  real exp_abs  [2][3][3] = '{'{'{0.2989, 0.3244, 0.5501}, '{0.2592, 0.2717, 0.3845}, '{0.2514, 0.2550, 0.2821}},
                              '{'{0.3154, 0.3236, 0.4501}, '{0.2640, 0.2684, 0.3348}, '{0.2529, 0.2542, 0.2713}}};
  // published mean |error|
  real pub_abs  [2][3][3] = '{'{'{0.2989, 0.3144, 0.3397}, '{0.2592, 0.2673, 0.2695}, '{0.2514, 0.2538, 0.2542}},
                              '{'{0.3154, 0.3236, 0.3428}, '{0.2640, 0.2684, 0.2705}, '{0.2529, 0.2542, 0.2555}}};

  for (genvar w = 1; w <= 3; w++) begin : g_w
    for (genvar m = 1; m <= 3; m++) begin : g_m
      acf_booth_multiplier #(.N(8),  .W(w), .METHOD(acf_pkg::acf_method_e'(m))) u8  (.a(a8),  .b(b8),  .p(p8[w-1][m-1]));
      acf_booth_multiplier #(.N(10), .W(w), .METHOD(acf_pkg::acf_method_e'(m))) u10 (.a(a10), .b(b10), .p(p10[w-1][m-1]));
    end
  end

  function automatic bit near(real x, real y);
    return (x - y < 0.0001) && (y - x < 0.0001);
  endfunction

  task automatic accumulate(int s, int w, int m, longint e);
    sum_e[s][w][m] += e;
    sum_a[s][w][m] += (e < 0) ? -e : e;
    if (((e < 0) ? -e : e) > max_a[s][w][m]) max_a[s][w][m] = (e < 0) ? -e : e;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int w = 0; w < 3; w++)
        for (int m = 0; m < 3; m++) begin
          sum_e[s][w][m] = 0; sum_a[s][w][m] = 0; max_a[s][w][m] = 0;
        end
    a8 = '0; b8 = '0;
    for (int bu = 0; bu < 1024; bu++) begin
      for (int au = 0; au < 1024; au++) begin
        a10 = 10'(au);
        b10 = 10'(bu);
        if (au < 256 && bu < 256) begin
          a8 = 8'(au);
          b8 = 8'(bu);
        end
        #1;
        for (int w = 0; w < 3; w++) begin
          for (int m = 0; m < 3; m++) begin
            accumulate(1, w, m, (acf_ref_pkg::sval(longint'(p10[w][m]), 10) <<< 10)
                                - acf_ref_pkg::sval(longint'(au), 10) * acf_ref_pkg::sval(longint'(bu), 10));
            if (au < 256 && bu < 256)
              accumulate(0, w, m, (acf_ref_pkg::sval(longint'(p8[w][m]), 8) <<< 8)
                                  - acf_ref_pkg::sval(longint'(au), 8) * acf_ref_pkg::sval(longint'(bu), 8));
          end
        end
      end
    end

    $display("  N  W  method   mean err   max|err|  mean|err|  published mean|err|");
    for (int s = 0; s < 2; s++) begin
      for (int w = 0; w < 3; w++) begin
        for (int m = 0; m < 3; m++) begin
          automatic int  n     = (s == 0) ? 8 : 10;
          automatic real lsb   = real'(longint'(1) << n);
          automatic real total = real'(longint'(1) << (2*n));
          automatic real me    = real'(sum_e[s][w][m]) / total / lsb;
          automatic real mx    = real'(max_a[s][w][m]) / lsb;
          automatic real ma    = real'(sum_a[s][w][m]) / total / lsb;
          $display(" %2d  %0d  ACF-%0d  %9.4f  %9.4f  %9.4f  %9.4f %s", n, w+1, m+1, me, mx, ma,
                   pub_abs[s][w][m], near(ma, pub_abs[s][w][m]) ? "agrees" : "differs");
          checks += 3;
          if (!near(me, exp_mean[s][w][m])) begin failures++; $display("FAIL mean error"); end
          if (!near(mx, exp_max[s][w][m]))  begin failures++; $display("FAIL max error"); end
          if (!near(ma, exp_abs[s][w][m]))  begin failures++; $display("FAIL mean |error|"); end
        end
      end
    end
    // the configuration presented as the main one must match the published figure
    checks += 3;
    if (!near(real'(sum_a[0][1][0]) / 65536.0 / 256.0, 0.2592)) failures++;
    if (!near(real'(sum_a[0][0][0]) / 65536.0 / 256.0, 0.2989)) failures++;
    if (!near(real'(sum_a[1][0][0]) / 1048576.0 / 1024.0, 0.3154)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
