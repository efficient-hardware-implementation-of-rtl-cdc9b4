// tb_brlwe_decoder: exhaustive test of the threshold decoder for q = 128.
// Expected: '1' for w in [q/4, 3q/4 - 1] = [32, 95] read unsigned.
module tb_brlwe_decoder;

  int checks = 0, failures = 0;
  logic [6:0] w;
  logic m;

  brlwe_decoder #(.LOGQ(7)) dut (.w, .m);

  initial begin
    for (int v = 0; v < 128; v++) begin
      w = 7'(v);
      #1;
      checks++;
      if (m != ((v >= 32) && (v < 96))) begin
        failures++;
        if (failures < 10) $display("FAIL w=%0d m=%0b", w, m);
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
