// tb_booth_encoder: checks the radix-4 Booth decoder on all eight triplets.
// The expected digit is -2*b[2i+1] + b[2i] + b[2i-1]; the decoded flags must
// give the same value, at most one of one/two may be set, and neg must be
// low whenever the digit is zero. Combinational: sampled 1 ns after driving.
module tb_booth_encoder;
  logic b_hi, b_mid, b_lo;
  acf_pkg::booth_sel_t sel;
  int checks = 0, failures = 0;

  booth_encoder dut (.b_hi(b_hi), .b_mid(b_mid), .b_lo(b_lo), .sel(sel));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int code = 0; code < 8; code++) begin
      int expd, got;
      {b_hi, b_mid, b_lo} = 3'(code);
      #1;
      expd = -2*int'(b_hi) + int'(b_mid) + int'(b_lo);
      got  = (sel.one ? 1 : sel.two ? 2 : 0) * (sel.neg ? -1 : 1);
      checks++;
      if (got != expd) begin
        failures++;
        $display("FAIL code %03b: digit %0d expected %0d", code[2:0], got, expd);
      end
      checks++;
      if (sel.one && sel.two) begin
        failures++;
        $display("FAIL code %03b: one and two both set", code[2:0]);
      end
      checks++;
      if (expd == 0 && sel.neg) begin
        failures++;
        $display("FAIL code %03b: neg set for a zero digit", code[2:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
