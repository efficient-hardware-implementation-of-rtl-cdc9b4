// brlwe_decoder: threshold decoder of the decryption stage.
//
// Returns '1' when a coefficient w, read as an unsigned value mod q, lies in
// the upper-middle half around q/2 and '0' near 0. With q a power of two this
// is the XOR of the two most significant bits: '1' for w in [q/4, 3q/4 - 1].
// The document states the range as the open interval (q/4, 3q/4) and says
// XORs are used; the single boundary value w = q/4 decodes to '1' here.
// Purely combinational.
module brlwe_decoder #(
  parameter int unsigned LOGQ = 7
) (
  input  logic [LOGQ-1:0] w,
  output logic            m
);

  always_comb m = w[LOGQ-1] ^ w[LOGQ-2];

endmodule
