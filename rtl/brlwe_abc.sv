// brlwe_abc: W = A*B mod (x^N + 1) + C for binary Ring-LWE, serial in and
// serial out, with U parallel groups (N = U*V).
//
// A and C have LOGQ-bit two's complement coefficients (q = 2^LOGQ, centred
// range, so additions wrap with no reduction); B is binary. The structure is
// a ring of N processing blocks (PBs) whose D cells hold the partial sums of
// W. Each computation cycle k every sum moves one PB to the right (the
// far-right PB feeds PB-1 through the ctr-1 MUX) and each PB adds the U
// products a_{l*V+k} * b_j of its fixed B bits, with the sign flipped where
// the exponent passed x^N. After V cycles the D cells hold W. This follows
// the document; the controller and handshake are this design's own.
//
// Use (timing in clock cycles):
//   1. Pulse start in IDLE. For the next N cycles load = 1 and each cycle
//      takes one b_in and one c_in: b_in in the order b_0, b_1, .., b_{N-1};
//      c_in in the order c_{N-1}, c_0, c_1, .., c_{N-2}.
//   2. For the next V = N/U cycles comp = 1; in cycle k (idx = k) drive
//      a_in[l] = a_{l*V+k} for every group l.
//   3. done pulses; W is held. It leaves serially during the LOAD phase of
//      the next operation, or during a DRAIN (pulse drain in IDLE): for N
//      cycles w_valid = 1 and w_out = w_{(V-1+idx) mod N} + e3_in, where
//      e3_in is the HD carry-in (e3 coefficient in encryption, else 0).
//      m_out is the threshold-decoded bit of w_out (decryption).
// Latency of the computation is V cycles (N for U = 1, N/2 for U = 2).
module brlwe_abc
  import brlwe_pkg::*;
#(
  parameter int unsigned N    = N_DEFAULT,
  parameter int unsigned U    = U_DEFAULT,
  parameter int unsigned LOGQ = LOGQ_DEFAULT,
  localparam int unsigned V   = N / U,
  localparam int unsigned CW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            drain,
  input  logic            b_in,
  input  logic [LOGQ-1:0] c_in,
  input  logic [LOGQ-1:0] a_in [U],
  input  logic            e3_in,
  output logic            load,
  output logic            comp,
  output logic            busy,
  output logic            done,
  output logic [CW-1:0]   idx,
  output logic            w_valid,
  output logic [LOGQ-1:0] w_out,
  output logic            m_out
);

  if (N % U != 0) begin : g_bad_u
    $error("N must be a multiple of U");
  end

  logic ctr1, ctr2, d_en, b_load, s_clr, s_shift;

  brlwe_ctrl #(.N(N), .V(V)) u_ctrl (
    .clk, .rst_n, .start, .drain,
    .ctr1, .ctr2, .d_en, .b_load, .s_clr, .s_shift,
    .load, .comp, .busy, .done, .idx
  );

  logic [N-1:0] bgrp [U];
  logic [N-1:0] s;

  brlwe_b_sr #(.N(N), .U(U)) u_b_sr (
    .clk, .rst_n, .load(b_load), .b_in, .grp(bgrp)
  );

  brlwe_sign_sr #(.N(N)) u_sign_sr (
    .clk, .rst_n, .clr(s_clr), .shift(s_shift), .s
  );

  // A is only let through while accumulating, so loading shifts unchanged.
  logic [LOGQ-1:0] a_eff [U];
  always_comb begin
    for (int l = 0; l < U; l++) a_eff[l] = ctr1 ? a_in[l] : '0;
  end

  logic [LOGQ-1:0] d [N];
  logic [LOGQ-1:0] ring_in;

  // ctr-1 MUX in front of PB-1: serial C in, or the far-right PB (circular).
  assign ring_in = ctr1 ? d[N-1] : c_in;

  for (genvar p = 0; p < N; p++) begin : g_pb
    logic [U-1:0] bp;
    for (genvar l = 0; l < U; l++) begin : g_b
      assign bp[l] = bgrp[l][p];
    end
    brlwe_pb #(.N(N), .U(U), .LOGQ(LOGQ), .P(p)) u_pb (
      .clk, .rst_n,
      .en    (d_en),
      .d_in  ((p == 0) ? ring_in : d[(p == 0) ? 0 : p - 1]),
      .a     (a_eff),
      .b     (bp),
      .s     (s[N-1-p]),
      .d_out (d[p])
    );
  end

  // Output: HD with the e3 carry-in, then the ctr-2 buffer.
  logic [LOGQ-1:0] hd_y;

  brlwe_hd #(.LOGQ(LOGQ)) u_hd (.x(d[N-1]), .cin(e3_in), .y(hd_y));

  assign w_valid = ctr2;
  assign w_out   = ctr2 ? hd_y : '0;

  brlwe_decoder #(.LOGQ(LOGQ)) u_dec (.w(w_out), .m(m_out));

endmodule
