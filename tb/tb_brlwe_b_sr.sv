// tb_brlwe_b_sr: N = 8, U = 2 (V = 4). B is loaded b_0 first; afterwards
// group l at PB p must read b_{(N-1-p-l*V) mod N}, and stay so while load
// is low.
module tb_brlwe_b_sr;

  localparam int unsigned N = 8, U = 2, V = N / U;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, b_in = 0;
  logic [N-1:0] grp [U];
  logic [N-1:0] bv;
  always #5 clk = ~clk;

  brlwe_b_sr #(.N(N), .U(U)) dut (.clk, .rst_n, .load, .b_in, .grp);

  task automatic expect_groups();
    for (int l = 0; l < int'(U); l++) begin
      for (int p = 0; p < int'(N); p++) begin
        checks++;
        if (grp[l][p] != bv[(2 * N - 1 - p - l * V) % N]) begin
          failures++;
          if (failures < 10) $display("FAIL l=%0d p=%0d", l, p);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      bv = N'($urandom);
      if (rep == 0) bv = 8'b0000_0001;
      load = 1;
      for (int i = 0; i < int'(N); i++) begin
        b_in = bv[i];
        @(negedge clk);
      end
      load = 0; b_in = 1;
      expect_groups();
      repeat (3) @(negedge clk);
      expect_groups();
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
