// brlwe_b_sr: shift register for the binary operand B.
//
// N one-bit cells loaded serially, b_0 first and b_{N-1} last, one bit per
// cycle while load is high; afterwards the contents stand still. Cell r then
// holds b_{N-1-r}. The taps are shared to give U groups of N bits: group l
// for PB position p is cell (p + l*V) mod N, i.e. b_{(N-1-p-l*V) mod N}.
// Group 0 runs b_{N-1}..b_0 across the PBs, group 1 (for U = 2) runs
// b_{V-1}..b_0, b_{N-1}..b_V, as in the document. The load enable and the
// reset to '0' are this design's own.
module brlwe_b_sr #(
  parameter int unsigned N = 512,
  parameter int unsigned U = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,      // shift b_in in
  input  logic         b_in,
  output logic [N-1:0] grp [U]    // grp[l][p]: B bit of group l for PB p
);

  localparam int unsigned V = N / U;

  logic [N-1:0] sreg;   // cell r: r = 0 is the first cell

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sreg <= '0;
    else if (load) sreg <= {sreg[N-2:0], b_in};
  end

  always_comb begin
    for (int l = 0; l < U; l++) begin
      for (int p = 0; p < N; p++) begin
        grp[l][p] = sreg[(p + l * V) % N];
      end
    end
  end

endmodule
