// tb_brlwe_hd: exhaustive test of the HD incrementer, y = x + cin mod 128.
module tb_brlwe_hd;

  int checks = 0, failures = 0;
  logic [6:0] x, y;
  logic cin;

  brlwe_hd #(.LOGQ(7)) dut (.x, .cin, .y);

  initial begin
    for (int v = 0; v < 256; v++) begin
      {cin, x} = 8'(v);
      #1;
      checks++;
      if (int'(y) != ((int'(x) + int'(cin)) % 128)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d cin=%0b y=%0d", x, cin, y);
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
