// abc_driver: stimulus, reference model and checker for brlwe_abc.
//
// Connects to the ports of one brlwe_abc instance. It runs, in order:
//   1. a BRLWE round trip built from the structure's own results:
//      key generation p = r1 - a_p*r2 (A = -a_p, B = r2, C = r1),
//      encryption c_t1 = a_p*e1 + e2 and c_t2 = p*e1 + m~ with e3 added by
//      the HD carry-in, decryption decode(c_t1*r2 + c_t2); each result is
//      read out with a DRAIN and fed to the next operation;
//   2. NOPS back-to-back random operations whose results leave during the
//      LOAD phase of the following operation, and a final DRAIN.
// Every output coefficient is compared with a schoolbook negacyclic product
// computed here (W = A*B mod (x^N + 1) + C, mod 2^LOGQ), the decoded bit with
// the XOR of the reference's two top bits, and the COMP phase must last
// exactly V = N/U cycles. Counters report how often each mechanism occurred.
// Inputs are driven on the falling clock edge, outputs sampled before the
// next rising edge.
module abc_driver #(
  parameter int unsigned N    = 16,
  parameter int unsigned U    = 1,
  parameter int unsigned LOGQ = 7,
  parameter int unsigned NOPS = 3,
  localparam int unsigned V   = N / U,
  localparam int unsigned CW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  output logic            start,
  output logic            drain,
  output logic            b_in,
  output logic [LOGQ-1:0] c_in,
  output logic [LOGQ-1:0] a_in [U],
  output logic            e3_in,
  input  logic            load,
  input  logic            comp,
  input  logic            busy,
  input  logic            done,
  input  logic [CW-1:0]   idx,
  input  logic            w_valid,
  input  logic [LOGQ-1:0] w_out,
  input  logic            m_out,
  output int              checks,
  output int              failures,
  output int              n_sign_neg,   // products negated through s
  output int              n_force_neg,  // products of groups l >= 1 negated by position
  output int              n_overlap,    // results read out under a LOAD
  output int              n_drain,      // DRAIN phases
  output int              n_e3,         // HD carry-ins that were '1'
  output int              n_dec_one,    // decoder outputs '1'
  output int              n_msg_ok,     // message bits recovered by decryption
  output logic            finished
);

  typedef logic [LOGQ-1:0] coef_t;

  coef_t A [N], C [N];
  logic  B [N], E3 [N];
  coef_t pendW [N];      // expected result waiting in the D cells
  logic  pendE3 [N];     // e3 to apply when it is read out
  logic  pend;
  coef_t cap [N];        // last result read out (with e3)
  logic  capm [N];

  task automatic fail(input string what);
    failures++;
    if (failures < 10) $display("FAIL %s at %0t", what, $time);
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) fail(what);
  endtask

  // Reference: schoolbook product mod x^N + 1, plus C.
  function automatic void reference();
    for (int i = 0; i < N; i++) pendW[i] = C[i];
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        if (B[j]) begin
          if (i + j < N) pendW[i+j] = pendW[i+j] + A[i];
          else begin
            pendW[i+j-N] = pendW[i+j-N] - A[i];
            if (A[i] != 0) begin
              if (i < V) n_sign_neg++;
              else       n_force_neg++;
            end
          end
        end
      end
    end
  endfunction

  // Output cycle k of an unload: check and capture w_{(V-1+k) mod N}.
  task automatic unload_cycle(input int k);
    int    i;
    coef_t expw;
    i = (V - 1 + k) % N;
    e3_in = pendE3[i];
    #1;
    expw = pendW[i] + coef_t'(pendE3[i]);
    check(w_valid == 1'b1, "w_valid");
    check(w_out == expw, $sformatf("w[%0d] got %0d exp %0d", i, w_out, expw));
    check(m_out == (expw[LOGQ-1] ^ expw[LOGQ-2]), "decoded bit");
    cap[i]  = w_out;
    capm[i] = m_out;
    if (pendE3[i]) n_e3++;
    if (m_out)     n_dec_one++;
  endtask

  // One operation on A, B, C (E3 applies when this result is read out).
  task automatic run_op();
    int ncomp;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    if (pend) n_overlap++;
    for (int k = 0; k < N; k++) begin
      if (k > 0) @(negedge clk);
      check(load && busy && (idx == CW'(k)), "LOAD phase / idx");
      b_in = B[k];
      c_in = (k == 0) ? C[N-1] : C[k-1];
      if (pend) unload_cycle(k);
      else begin
        #1 check(!w_valid && (w_out == '0), "output buffer closed");
      end
    end
    pend = 1'b0;
    reference();
    for (int i = 0; i < N; i++) pendE3[i] = E3[i];
    ncomp = 0;
    @(negedge clk);
    while (comp) begin
      check(idx == CW'(ncomp), "COMP idx");
      for (int l = 0; l < U; l++) a_in[l] = A[l * V + ncomp];
      ncomp++;
      @(negedge clk);
      if (ncomp > N + 2) break;
    end
    for (int l = 0; l < U; l++) a_in[l] = '0;
    check(ncomp == V, $sformatf("computation took %0d cycles, expected %0d", ncomp, V));
    check(done && !busy, "done pulse");
    pend = 1'b1;
  endtask

  task automatic run_drain();
    @(negedge clk) drain = 1'b1;
    @(negedge clk) drain = 1'b0;
    n_drain++;
    for (int k = 0; k < N; k++) begin
      if (k > 0) @(negedge clk);
      unload_cycle(k);
    end
    pend = 1'b0;
    @(negedge clk);
    check(!busy && !w_valid, "DRAIN ends");
    e3_in = 1'b0;
  endtask

  function automatic void clear_e3();
    for (int i = 0; i < N; i++) E3[i] = 1'b0;
  endfunction

  coef_t ap [N], pk [N], ct1 [N], ct2 [N];
  logic  r1 [N], r2 [N], e1 [N], e2 [N], e3 [N], msg [N];

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    n_sign_neg = 0; n_force_neg = 0; n_overlap = 0; n_drain = 0;
    n_e3 = 0; n_dec_one = 0; n_msg_ok = 0;
    start = 0; drain = 0; b_in = 0; c_in = '0; e3_in = 0; pend = 0;
    for (int l = 0; l < U; l++) a_in[l] = '0;
    for (int i = 0; i < N; i++) begin
      ap[i] = coef_t'($urandom); r1[i] = 1'($urandom); r2[i] = 1'($urandom);
      e1[i] = 1'($urandom); e2[i] = 1'($urandom); e3[i] = 1'($urandom);
      msg[i] = 1'($urandom);
    end
    repeat (3) @(negedge clk);

    // Key generation: p = r1 - a_p*r2.
    for (int i = 0; i < N; i++) begin
      A[i] = -ap[i]; B[i] = r2[i]; C[i] = coef_t'(r1[i]);
    end
    clear_e3();
    run_op(); run_drain();
    for (int i = 0; i < N; i++) pk[i] = cap[i];
    // Encryption: c_t1 = a_p*e1 + e2.
    for (int i = 0; i < N; i++) begin
      A[i] = ap[i]; B[i] = e1[i]; C[i] = coef_t'(e2[i]);
    end
    run_op(); run_drain();
    for (int i = 0; i < N; i++) ct1[i] = cap[i];
    // Encryption: c_t2 = p*e1 + m~, e3 added by the HD carry-in.
    for (int i = 0; i < N; i++) begin
      A[i] = pk[i]; B[i] = e1[i]; C[i] = {msg[i], {(LOGQ-1){1'b0}}};
      E3[i] = e3[i];
    end
    run_op(); run_drain();
    for (int i = 0; i < N; i++) ct2[i] = cap[i];
    clear_e3();
    // Decryption: decode(c_t1*r2 + c_t2).
    for (int i = 0; i < N; i++) begin
      A[i] = ct1[i]; B[i] = r2[i]; C[i] = ct2[i];
    end
    run_op(); run_drain();
    for (int i = 0; i < N; i++) if (capm[i] == msg[i]) n_msg_ok++;

    // Back-to-back random operations, unloading under the next LOAD.
    for (int op = 0; op < int'(NOPS); op++) begin
      for (int i = 0; i < N; i++) begin
        A[i] = coef_t'($urandom); B[i] = 1'($urandom);
        C[i] = coef_t'($urandom); E3[i] = 1'($urandom);
      end
      if (op == 0) begin
        // Extremes: all ones in B, most negative A.
        for (int i = 0; i < N; i++) begin
          B[i] = 1'b1; A[i] = {1'b1, {(LOGQ-1){1'b0}}};
        end
      end
      run_op();
    end
    run_drain();
    finished = 1'b1;
  end

endmodule
