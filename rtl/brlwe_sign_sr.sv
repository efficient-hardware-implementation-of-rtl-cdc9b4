// brlwe_sign_sr: shift register producing the sign controls s_{N-1}..s_0.
//
// N one-bit cells in a row. The first cell drives s_{N-1}, the last s_0, and
// PB-(k+1) reads s_{N-1-k}. Cells are cleared to '0' (clr, also done by
// reset); during the accumulation a '1' is shifted in at the first cell every
// cycle (shift). In computation cycle t (t = 0, 1, ...) the first t cells are
// therefore '1': exactly the PBs whose group-0 product a_t*b_j has an
// exponent t + j >= n and so changes sign (x^n = -1). This is the document's
// structure; the clr/shift enables are this design's own.
module brlwe_sign_sr #(
  parameter int unsigned N = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,    // synchronous clear to all '0'
  input  logic         shift,  // shift a '1' in at s_{N-1}
  output logic [N-1:0] s       // s[i] is s_i
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     s <= '0;
    else if (clr)   s <= '0;
    else if (shift) s <= {1'b1, s[N-1:1]};
  end

endmodule
