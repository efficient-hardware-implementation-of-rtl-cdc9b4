// tb_brlwe_cc: exhaustive test of the carry/sign cell with U = 2 and group 1
// forced negative: neg[l] = (s | FORCE_NEG[l]) & b[l].
module tb_brlwe_cc;

  int checks = 0, failures = 0;
  logic s;
  logic [1:0] b, neg;

  brlwe_cc #(.U(2), .FORCE_NEG(2'b10)) dut (.s, .b, .neg);

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp;
      {s, b} = 3'(v);
      #1;
      exp[0] = s & b[0];
      exp[1] = b[1];
      checks++;
      if (neg != exp) begin
        failures++;
        $display("FAIL s=%0b b=%b neg=%b exp=%b", s, b, neg, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
