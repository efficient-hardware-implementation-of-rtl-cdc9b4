// brlwe_hd: HD, the half-adder chain behind the far-right PB.
//
// Adds a single carry-in bit to a LOGQ-bit coefficient, modulo 2^LOGQ = q.
// In encryption the carry-in is the matching coefficient of the binary error
// polynomial e3, so c_t2 = p*e1 + e3 + m~ leaves the structure complete; in
// the other operations it is '0'. Purely combinational. The document gives
// only its role and its carry-in; the ripple of half adders is this design's.
module brlwe_hd #(
  parameter int unsigned LOGQ = 7
) (
  input  logic [LOGQ-1:0] x,
  input  logic            cin,
  output logic [LOGQ-1:0] y
);

  logic [LOGQ-1:0] c;   // carry into bit i; the carry out of the MSB is dropped (mod q)

  assign c[0] = cin;

  for (genvar i = 0; i < LOGQ; i++) begin : g_ha
    assign y[i] = x[i] ^ c[i];
    if (i + 1 < LOGQ) begin : g_c
      assign c[i+1] = x[i] & c[i];
    end
  end

endmodule
