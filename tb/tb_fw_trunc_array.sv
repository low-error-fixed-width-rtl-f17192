// tb_fw_trunc_array: checks the truncated partial-product sum.
// At N = 8 all operand pairs are applied to arrays keeping W = 1, 2 and 3
// truncated columns; at N = 10, W = 2 a random sample is applied. The
// expected kept[] is the exact sum of the Booth rows' bits in columns >= N-W
// worked out arithmetically (acf_ref_pkg::trunc_sum), shifted down by N-W,
// modulo 2^(N+W). Combinational: sampled 1 ns after driving.
module tb_fw_trunc_array;
  localparam int N = 8;
  localparam int N10 = 10;
  logic [N-1:0] a, b;
  logic [N+1-1:0] k1;
  logic [N+2-1:0] k2;
  logic [N+3-1:0] k3;
  logic [N10-1:0] a10, b10;
  logic [N10+2-1:0] k10;
  int checks = 0, failures = 0;

  fw_trunc_array #(.N(N), .W(1)) dut1 (.a(a), .b(b), .kept(k1));
  fw_trunc_array #(.N(N), .W(2)) dut2 (.a(a), .b(b), .kept(k2));
  fw_trunc_array #(.N(N), .W(3)) dut3 (.a(a), .b(b), .kept(k3));
  fw_trunc_array #(.N(N10), .W(2)) dut10 (.a(a10), .b(b10), .kept(k10));

  task automatic check(string tag, longint got, longint av, longint bv, int n, int w);
    longint expd = (acf_ref_pkg::trunc_sum(av, bv, n, w) >>> (n - w)) & ((longint'(1) << (n + w)) - 1);
    checks++;
    if (got != expd) begin
      failures++;
      if (failures < 10) $display("FAIL %s A=%0d B=%0d: kept %0h expected %0h", tag, av, bv, got, expd);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a10 = '0; b10 = '0;
    for (int bu = 0; bu < (1 << N); bu++) begin
      for (int au = 0; au < (1 << N); au++) begin
        a = N'(au);
        b = N'(bu);
        #1;
        check("W1", longint'(k1), acf_ref_pkg::sval(longint'(au), N), acf_ref_pkg::sval(longint'(bu), N), N, 1);
        check("W2", longint'(k2), acf_ref_pkg::sval(longint'(au), N), acf_ref_pkg::sval(longint'(bu), N), N, 2);
        check("W3", longint'(k3), acf_ref_pkg::sval(longint'(au), N), acf_ref_pkg::sval(longint'(bu), N), N, 3);
      end
    end
    for (int t = 0; t < 20000; t++) begin
      a10 = N10'($urandom);
      b10 = N10'($urandom);
      #1;
      check("N10", longint'(k10), acf_ref_pkg::sval(longint'(a10), N10),
            acf_ref_pkg::sval(longint'(b10), N10), N10, 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
