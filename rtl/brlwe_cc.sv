// brlwe_cc: carry/sign cell (CC) of one processing block.
//
// For each of the U partial products of a PB it decides whether the product
// a*b enters the accumulation negated. A product is negated when its exponent
// wrapped past x^n (x^n = -1 in Z_q[x]/(x^n + 1)). That happens either because
// the running sign control s of this PB is '1', or, for group l >= 1, because
// this PB sits in the part of the ring whose products always wrap (FORCE_NEG
// bit l set; fixed by the PB's position, see brlwe_pb). The AND gate with the
// B bit makes the flag '0' when the product is zero, so that flag can serve
// directly as the one's-complement XOR mask and as the carry-in of the ADT.
//
// Purely combinational. The AND gates follow the CC drawing of the document;
// the OR with the position-fixed FORCE_NEG bit is this design's own way of
// supplying the sign for groups l >= 1.
module brlwe_cc #(
  parameter int unsigned U = 1,
  parameter logic [U-1:0] FORCE_NEG = '0
) (
  input  logic         s,    // sign control s_i from the sign shift register
  input  logic [U-1:0] b,    // B bit of each group for this PB
  output logic [U-1:0] neg   // '1': add the one's complement and a carry-in
);

  always_comb begin
    for (int l = 0; l < U; l++) begin
      neg[l] = (s | FORCE_NEG[l]) & b[l];
    end
  end

endmodule
