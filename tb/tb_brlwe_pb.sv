// tb_brlwe_pb: four processing blocks wired as a ring, n = 4, u = 2, v = 2,
// the worked example of the structure. C is shifted in (order c3, c0, c1, c2)
// with a = 0, which must leave c2, c1, c0, c3 in PB-1..PB-4. Then two
// accumulation cycles with a = {a0, a2} and {a1, a3}, group-0 bits
// b3, b2, b1, b0 and group-1 bits b1, b0, b3, b2, and sign controls all '0'
// in cycle 1 and only PB-1's '1' in cycle 2. After cycle 1 the D cells must
// hold
//   a0b3 + a2b1 + c3 | a0b2 + a2b0 + c2 | a0b1 - a2b3 + c1 | a0b0 - a2b2 + c0
// and after cycle 2 w0 | w3 | w2 | w1 with
//   w0 = a0b0 - a3b1 - a2b2 - a1b3 + c0, w1 = a1b0 + a0b1 - a3b2 - a2b3 + c1,
//   w2 = a2b0 + a1b1 + a0b2 - a3b3 + c2, w3 = a3b0 + a2b1 + a1b2 + a0b3 + c3.
// Random a, b, c; all arithmetic mod 128.
module tb_brlwe_pb;

  localparam int unsigned N = 4, U = 2, LOGQ = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, acc = 0;
  logic [LOGQ-1:0] c_in = '0;
  logic [LOGQ-1:0] a [U];
  logic [U-1:0] bp [N];
  logic [N-1:0] s;
  logic [LOGQ-1:0] d [N];
  always #5 clk = ~clk;

  for (genvar p = 0; p < N; p++) begin : g_pb
    brlwe_pb #(.N(N), .U(U), .LOGQ(LOGQ), .P(p)) u_pb (
      .clk, .rst_n, .en,
      .d_in  ((p == 0) ? (acc ? d[N-1] : c_in) : d[(p == 0) ? 0 : p - 1]),
      .a, .b(bp[p]), .s(s[N-1-p]), .d_out(d[p])
    );
  end

  int av [4], cv [4];
  bit bv [4];

  function automatic int pr(input int i, input int j);
    return bv[j] ? av[i] : 0;
  endfunction

  task automatic expect4(input int e0, e1, e2, e3, input string w);
    int e [4];
    e = '{e0, e1, e2, e3};
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (d[p] != LOGQ'(e[p])) begin
        failures++;
        if (failures < 10) $display("FAIL %s PB-%0d got %0d exp %0d", w, p + 1, d[p], e[p] & 127);
      end
    end
  endtask

  initial begin
    a[0] = '0; a[1] = '0; s = '0;
    for (int p = 0; p < 4; p++) bp[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 50; it++) begin
      for (int i = 0; i < 4; i++) begin
        av[i] = $urandom_range(127); cv[i] = $urandom_range(127); bv[i] = 1'($urandom);
      end
      if (it == 0) for (int i = 0; i < 4; i++) bv[i] = 1'b1;
      // B taps: group 0 b3 b2 b1 b0, group 1 b1 b0 b3 b2 across PB-1..PB-4.
      bp[0] = {bv[1], bv[3]}; bp[1] = {bv[0], bv[2]};
      bp[2] = {bv[3], bv[1]}; bp[3] = {bv[2], bv[0]};
      s = '0;  // stale sign bits from the previous round
      // Load C with a = 0.
      en = 1; acc = 0; a[0] = '0; a[1] = '0;
      foreach (cv[k]) begin
        c_in = LOGQ'((k == 0) ? cv[3] : cv[k-1]);
        @(negedge clk);
      end
      expect4(cv[2], cv[1], cv[0], cv[3], "loaded C");
      // Cycle 1.
      acc = 1; s = 4'b0000;
      a[0] = LOGQ'(av[0]); a[1] = LOGQ'(av[2]);
      @(negedge clk);
      expect4(pr(0,3) + pr(2,1) + cv[3], pr(0,2) + pr(2,0) + cv[2],
              pr(0,1) - pr(2,3) + cv[1], pr(0,0) - pr(2,2) + cv[0], "cycle 1");
      // Cycle 2.
      s = 4'b1000;
      a[0] = LOGQ'(av[1]); a[1] = LOGQ'(av[3]);
      @(negedge clk);
      en = 0;
      expect4(pr(0,0) - pr(3,1) - pr(2,2) - pr(1,3) + cv[0],
              pr(3,0) + pr(2,1) + pr(1,2) + pr(0,3) + cv[3],
              pr(2,0) + pr(1,1) + pr(0,2) - pr(3,3) + cv[2],
              pr(1,0) + pr(0,1) - pr(3,2) - pr(2,3) + cv[1], "cycle 2");
      @(negedge clk);
      expect4(pr(0,0) - pr(3,1) - pr(2,2) - pr(1,3) + cv[0],
              pr(3,0) + pr(2,1) + pr(1,2) + pr(0,3) + cv[3],
              pr(2,0) + pr(1,1) + pr(0,2) - pr(3,3) + cv[2],
              pr(1,0) + pr(0,1) - pr(3,2) - pr(2,3) + cv[1], "hold");
      s = 4'b1100;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
