// tb_brlwe_adt: random test of the adder tree for U = 1, 2 and 3 (LOGQ = 7).
// The expected sum acc + sum(term) + sum(cin) mod 2^7 is computed with
// integer arithmetic in the testbench.
module tb_brlwe_adt;

  localparam int unsigned LOGQ = 7;
  int checks = 0, failures = 0;

  logic [LOGQ-1:0] acc;
  logic [LOGQ-1:0] t1 [1], t2 [2], t3 [3];
  logic [0:0] c1; logic [1:0] c2; logic [2:0] c3;
  logic [LOGQ-1:0] s1, s2, s3;

  brlwe_adt #(.U(1), .LOGQ(LOGQ)) u1 (.acc, .term(t1), .cin(c1), .sum(s1));
  brlwe_adt #(.U(2), .LOGQ(LOGQ)) u2 (.acc, .term(t2), .cin(c2), .sum(s2));
  brlwe_adt #(.U(3), .LOGQ(LOGQ)) u3 (.acc, .term(t3), .cin(c3), .sum(s3));

  task automatic chk(input logic [LOGQ-1:0] got, input int exp, input string w);
    checks++;
    if (got != LOGQ'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", w, got, exp & 127);
    end
  endtask

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int e1, e2, e3;
      acc = LOGQ'($urandom);
      for (int l = 0; l < 3; l++) t3[l] = LOGQ'($urandom);
      t1[0] = t3[0]; t2[0] = t3[0]; t2[1] = t3[1];
      c3 = 3'($urandom); c1 = c3[0]; c2 = c3[1:0];
      #1;
      e1 = int'(acc) + int'(t3[0]) + int'(c3[0]);
      e2 = e1 + int'(t3[1]) + int'(c3[1]);
      e3 = e2 + int'(t3[2]) + int'(c3[2]);
      chk(s1, e1, "U=1"); chk(s2, e2, "U=2"); chk(s3, e3, "U=3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
