// brlwe_pb: processing block (PB) at position P (0 = PB-1, leftmost) of the
// ring of N PBs.
//
// The PB owns one D cell, a LOGQ-bit register. When enabled it loads
//   d_in + sum over l of (+/-) a[l]*b[l]
// where d_in is the D cell of the left neighbour (for PB-1, the ctr-1 MUX),
// a[l] is the integer coefficient a_{l*v+k} broadcast to every PB in cycle k
// and b[l] is this PB's B bit of group l. So each cycle every partial sum
// moves one PB to the right and picks up one product per group. The product
// a*b is formed by AND gates; a product to be subtracted is one's-complemented
// and gets a carry-in in the ADT (two's complement negation).
//
// Sign: group 0 is negated when the sign control s of this PB is '1'. Group
// l >= 1 at PB positions P >= N - l*V is always negated (its exponent
// l*v + k + j always lands in [n, 2n)); elsewhere it follows s like group 0.
// The always-negated region follows from the index mapping of the document's
// n = 4, u = 2 example; how it is wired is this design's own choice.
//
// With a = 0 (as during loading) every term is zero, negated or not, so the
// ring then acts as a plain shift register for serial C in and W out.
// Timing: one clock edge per step; d_out is the registered D cell.
// Reset clears the D cell to 0.
module brlwe_pb #(
  parameter int unsigned N    = 512,
  parameter int unsigned U    = 1,
  parameter int unsigned LOGQ = 7,
  parameter int unsigned P    = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,         // D cell update enable
  input  logic [LOGQ-1:0] d_in,       // left neighbour / ctr-1 MUX
  input  logic [LOGQ-1:0] a [U],      // broadcast A coefficients, one per group
  input  logic [U-1:0]    b,          // this PB's B bit of each group
  input  logic            s,          // sign control s_{N-1-P}
  output logic [LOGQ-1:0] d_out       // D cell
);

  localparam int unsigned V = N / U;

  function automatic logic [U-1:0] force_mask();
    logic [U-1:0] m;
    for (int l = 0; l < U; l++) m[l] = (l > 0) && (P >= N - l * V);
    return m;
  endfunction

  localparam logic [U-1:0] FORCE_NEG = force_mask();

  logic [U-1:0]    neg;
  logic [LOGQ-1:0] term [U];
  logic [LOGQ-1:0] sum;

  brlwe_cc #(.U(U), .FORCE_NEG(FORCE_NEG)) u_cc (
    .s   (s),
    .b   (b),
    .neg (neg)
  );

  always_comb begin
    for (int l = 0; l < U; l++) begin
      term[l] = (a[l] & {LOGQ{b[l]}}) ^ {LOGQ{neg[l]}};
    end
  end

  brlwe_adt #(.U(U), .LOGQ(LOGQ)) u_adt (
    .acc  (d_in),
    .term (term),
    .cin  (neg),
    .sum  (sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  d_out <= '0;
    else if (en) d_out <= sum;
  end

endmodule
