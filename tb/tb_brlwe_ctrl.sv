// tb_brlwe_ctrl: N = 8, V = 4. Checks the phase lengths (LOAD N cycles,
// COMP V cycles, DRAIN N cycles), the control outputs in each phase, that
// ctr-2 is only raised under a LOAD when a result is pending, and that a
// drain request without a pending result is ignored.
module tb_brlwe_ctrl;

  localparam int unsigned N = 8, V = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, drain = 0;
  logic ctr1, ctr2, d_en, b_load, s_clr, s_shift, load, comp, busy, done;
  logic [2:0] idx;
  always #5 clk = ~clk;

  brlwe_ctrl #(.N(N), .V(V)) dut (
    .clk, .rst_n, .start, .drain, .ctr1, .ctr2, .d_en, .b_load, .s_clr,
    .s_shift, .load, .comp, .busy, .done, .idx
  );

  task automatic chk(input logic ok, input string w);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", w, $time);
    end
  endtask

  task automatic op(input logic pending);
    start = 1; @(negedge clk); start = 0;
    for (int k = 0; k < int'(N); k++) begin
      chk(load && !ctr1 && b_load && s_clr && d_en && busy && idx == 3'(k), "LOAD");
      chk(ctr2 == pending, "ctr2 under LOAD");
      @(negedge clk);
    end
    for (int k = 0; k < int'(V); k++) begin
      chk(comp && ctr1 && s_shift && d_en && !b_load && !ctr2 && idx == 3'(k), "COMP");
      @(negedge clk);
    end
    chk(done && !busy && !d_en, "done");
    @(negedge clk);
    chk(!done, "done one cycle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    drain = 1; @(negedge clk); drain = 0;
    chk(!busy, "drain without result ignored");
    op(1'b0);
    op(1'b1);
    drain = 1; @(negedge clk); drain = 0;
    for (int k = 0; k < int'(N); k++) begin
      chk(ctr2 && !ctr1 && !b_load && d_en && idx == 3'(k), "DRAIN");
      @(negedge clk);
    end
    chk(!busy && !ctr2, "after DRAIN");
    drain = 1; @(negedge clk); drain = 0;
    chk(!busy, "second drain ignored");
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
