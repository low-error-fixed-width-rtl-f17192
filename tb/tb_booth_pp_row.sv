// tb_booth_pp_row: checks one partial-product row for every multiplicand and
// every Booth digit at N = 8. The row read as a signed N+1 bit number plus
// its correction bit n must equal digit * A, and n must be set exactly for
// negative digits. Combinational: sampled 1 ns after driving.
module tb_booth_pp_row;
  localparam int N = 8;
  logic [N-1:0] a;
  acf_pkg::booth_sel_t sel;
  logic [N:0] pp;
  logic n;
  int checks = 0, failures = 0;

  booth_pp_row #(.N(N)) dut (.a(a), .sel(sel), .pp(pp), .n(n));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // digits -2..2 as {neg, one, two}
    automatic acf_pkg::booth_sel_t codes [5] = '{3'b101, 3'b110, 3'b000, 3'b010, 3'b001};
    automatic int digits [5] = '{-2, -1, 0, 1, 2};
    for (int k = 0; k < 5; k++) begin
      for (int au = 0; au < (1 << N); au++) begin
        longint av, got;
        a   = N'(au);
        sel = codes[k];
        #1;
        av  = acf_ref_pkg::sval(longint'(au), N);
        got = acf_ref_pkg::sval(longint'(pp), N+1) + longint'(n);
        checks++;
        if (got != longint'(digits[k]) * av) begin
          failures++;
          if (failures < 10) $display("FAIL A=%0d digit %0d: row %0d", av, digits[k], got);
        end
        checks++;
        if (n != (digits[k] < 0)) begin
          failures++;
          if (failures < 10) $display("FAIL A=%0d digit %0d: n=%0b", av, digits[k], n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
