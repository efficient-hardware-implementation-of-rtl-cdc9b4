// tb_brlwe_abc_full: brlwe_abc at its default size (N = 512, U = 1,
// q = 128) through a complete BRLWE key generation, encryption and
// decryption round trip plus one random product read out under the next
// LOAD, every coefficient checked against a schoolbook reference and the
// computation latency checked to be N/U = 512 cycles (see abc_driver).
module tb_brlwe_abc_full;

  import brlwe_pkg::*;

  localparam int unsigned N    = N_DEFAULT;
  localparam int unsigned U    = U_DEFAULT;
  localparam int unsigned LOGQ = LOGQ_DEFAULT;
  localparam int unsigned CW   = $clog2(N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            start, drain, b_in, e3_in, load, comp, busy, done;
  logic            w_valid, m_out;
  logic [LOGQ-1:0] c_in, w_out;
  logic [LOGQ-1:0] a_in [U];
  logic [CW-1:0]   idx;
  int chk, fl, sn, fn, ov, dr, e3c, d1, mok;
  logic fin;

  brlwe_abc u_dut (
    .clk, .rst_n, .start, .drain, .b_in, .c_in, .a_in, .e3_in,
    .load, .comp, .busy, .done, .idx, .w_valid, .w_out, .m_out
  );

  abc_driver #(.N(N), .U(U), .LOGQ(LOGQ), .NOPS(2)) u_drv (
    .clk, .start, .drain, .b_in, .c_in, .a_in, .e3_in,
    .load, .comp, .busy, .done, .idx, .w_valid, .w_out, .m_out,
    .checks(chk), .failures(fl), .n_sign_neg(sn), .n_force_neg(fn),
    .n_overlap(ov), .n_drain(dr), .n_e3(e3c), .n_dec_one(d1),
    .n_msg_ok(mok), .finished(fin)
  );

  int checks, failures;

  initial begin
    #12 rst_n = 1'b1;
    wait (fin);
    checks = chk + 4;
    failures = fl;
    if (sn == 0) failures++;
    if (ov == 0) failures++;
    if (dr == 0) failures++;
    if (e3c == 0) failures++;
    $display("N=%0d U=%0d: sign_neg=%0d overlap=%0d drain=%0d e3=%0d dec1=%0d msg_ok=%0d/%0d",
             N, U, sn, ov, dr, e3c, d1, mok, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk, fl + 1);
    $finish;
  end

endmodule
