// tb_brlwe_workloads: the evaluated configurations other than the default:
// n = 256 with u = 1 and u = 2, and n = 512 with u = 2, all with q = 128.
// Each runs a BRLWE key generation / encryption / decryption round trip and
// one back-to-back random product through brlwe_abc (see abc_driver), with
// every coefficient checked against a schoolbook reference and the
// computation latency checked to be n/u cycles. The test fails if a
// mechanism never occurred (sign change through the sign register,
// position-fixed negation for u = 2, unloading under LOAD, DRAIN, HD
// carry-in, decoder '1').
module tb_brlwe_workloads;

  localparam int unsigned LOGQ = 7;
  localparam int NCFG = 3;
  localparam int unsigned CN [NCFG] = '{256, 256, 512};
  localparam int unsigned CU [NCFG] = '{1, 2, 2};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int   chk [NCFG], fl [NCFG], sn [NCFG], fn [NCFG], ov [NCFG], dr [NCFG];
  int   e3c [NCFG], d1 [NCFG], mok [NCFG];
  logic fin [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned N  = CN[g];
    localparam int unsigned U  = CU[g];
    localparam int unsigned CW = $clog2(N);
    logic            start, drain, b_in, e3_in, load, comp, busy, done;
    logic            w_valid, m_out;
    logic [LOGQ-1:0] c_in, w_out;
    logic [LOGQ-1:0] a_in [U];
    logic [CW-1:0]   idx;

    brlwe_abc #(.N(N), .U(U), .LOGQ(LOGQ)) u_dut (
      .clk, .rst_n, .start, .drain, .b_in, .c_in, .a_in, .e3_in,
      .load, .comp, .busy, .done, .idx, .w_valid, .w_out, .m_out
    );

    abc_driver #(.N(N), .U(U), .LOGQ(LOGQ), .NOPS(2)) u_drv (
      .clk, .start, .drain, .b_in, .c_in, .a_in, .e3_in,
      .load, .comp, .busy, .done, .idx, .w_valid, .w_out, .m_out,
      .checks(chk[g]), .failures(fl[g]), .n_sign_neg(sn[g]),
      .n_force_neg(fn[g]), .n_overlap(ov[g]), .n_drain(dr[g]), .n_e3(e3c[g]),
      .n_dec_one(d1[g]), .n_msg_ok(mok[g]), .finished(fin[g])
    );
  end

  int checks, failures;

  task automatic need(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    checks = 0; failures = 0;
    for (int g = 0; g < NCFG; g++) begin
      checks += chk[g]; failures += fl[g];
      $display("N=%0d U=%0d: checks=%0d failures=%0d sign_neg=%0d force_neg=%0d overlap=%0d drain=%0d e3=%0d dec1=%0d msg_ok=%0d/%0d",
               CN[g], CU[g], chk[g], fl[g], sn[g], fn[g], ov[g], dr[g], e3c[g], d1[g], mok[g], CN[g]);
      need(sn[g], "negation through s");
      need(ov[g], "unload under LOAD");
      need(dr[g], "DRAIN");
      need(e3c[g], "HD carry-in");
      need(d1[g], "decoder '1'");
      if (CU[g] > 1) need(fn[g], "position-fixed negation (U > 1)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
