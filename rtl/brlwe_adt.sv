// brlwe_adt: adder tree (ADT) of one processing block.
//
// Adds U+1 operands of LOGQ bits (the accumulator value coming from the left
// neighbour and the U masked partial products) with U adders (AD), each AD
// taking one carry-in bit. A partial product that has to be subtracted
// arrives one's-complemented with its carry-in set, so the tree forms its
// two's complement without a separate negation. All arithmetic wraps modulo
// 2^LOGQ = q, which is the modular addition of Z_q in the centred two's
// complement range.
//
// The operands sit at the leaves of a complete binary tree stored as a heap:
// node i (i < U) is an AD adding nodes 2i+1 and 2i+2 plus cin[i]; leaves are
// nodes U..2U (leaf U is the accumulator, leaf U+1+l is term[l]). With U = 1
// this is one adder, with U = 2 a chain of two, matching the adder count and
// critical path (u adders, 2 T_AD for u = 2) the document gives. The heap
// arrangement for larger U is this design's choice. Purely combinational.
module brlwe_adt #(
  parameter int unsigned U    = 1,
  parameter int unsigned LOGQ = 7
) (
  input  logic [LOGQ-1:0] acc,
  input  logic [LOGQ-1:0] term [U],
  input  logic [U-1:0]    cin,
  output logic [LOGQ-1:0] sum
);

  logic [LOGQ-1:0] node [2*U+1];

  always_comb begin
    node[U] = acc;
    for (int l = 0; l < U; l++) node[U+1+l] = term[l];
    for (int i = int'(U) - 1; i >= 0; i--) begin
      node[i] = node[2*i+1] + node[2*i+2] + LOGQ'(cin[i]);
    end
    sum = node[0];
  end

endmodule
