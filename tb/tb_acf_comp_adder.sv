// tb_acf_comp_adder: checks the final compensated addition at N = 8 for
// W = 1 and W = 3 over every kept-sum value and every compensation word.
// Expected: floor((kept*2^(N-W) + cout*2^(N-W)) / 2^N) modulo 2^N, i.e. cout1
// enters column N-W. Combinational: sampled 1 ns after driving.
module tb_acf_comp_adder;
  localparam int N = 8;
  logic [N+1-1:0] kept1;
  logic [N+3-1:0] kept3;
  logic [3:0]     cout;
  logic [N-1:0]   p1, p3;
  int checks = 0, failures = 0;

  acf_comp_adder #(.N(N), .W(1)) dut1 (.kept(kept1), .cout(cout), .p(p1));
  acf_comp_adder #(.N(N), .W(3)) dut3 (.kept(kept3), .cout(cout), .p(p3));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      for (int k = 0; k < (1 << (N+3)); k++) begin
        longint e1, e3;
        cout  = 4'(c);
        kept1 = (N+1)'(k);
        kept3 = (N+3)'(k);
        #1;
        e1 = ((longint'(kept1) * (1 << (N-1)) + longint'(c) * (1 << (N-1))) / (1 << N)) % (1 << N);
        e3 = ((longint'(kept3) * (1 << (N-3)) + longint'(c) * (1 << (N-3))) / (1 << N)) % (1 << N);
        checks++;
        if (longint'(p1) != e1) begin
          failures++;
          if (failures < 10) $display("FAIL W=1 kept=%0d cout=%0d: p=%0d expected %0d", kept1, c, p1, e1);
        end
        checks++;
        if (longint'(p3) != e3) begin
          failures++;
          if (failures < 10) $display("FAIL W=3 kept=%0d cout=%0d: p=%0d expected %0d", kept3, c, p3, e3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
