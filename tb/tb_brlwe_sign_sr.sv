// tb_brlwe_sign_sr: N = 8. After a clear, t shift cycles must leave exactly
// s_{N-1} .. s_{N-t} at '1'; the register holds when idle and clears again.
module tb_brlwe_sign_sr;

  localparam int unsigned N = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, shift = 0;
  logic [N-1:0] s;
  always #5 clk = ~clk;

  brlwe_sign_sr #(.N(N)) dut (.clk, .rst_n, .clr, .shift, .s);

  task automatic expect_t(input int t);
    logic [N-1:0] e;
    for (int i = 0; i < int'(N); i++) e[i] = (i >= int'(N) - t);
    checks++;
    if (s != e) begin
      failures++;
      $display("FAIL t=%0d s=%b exp=%b", t, s, e);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_t(0);
    for (int rep = 0; rep < 2; rep++) begin
      for (int t = 1; t <= int'(N) + 1; t++) begin
        shift = 1; @(negedge clk); shift = 0;
        expect_t(t > int'(N) ? int'(N) : t);
        if (t == 3) begin
          repeat (2) @(negedge clk);  // idle: holds
          expect_t(3);
        end
      end
      clr = 1; @(negedge clk); clr = 0;
      expect_t(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
