// data_corrector: corrects a single upset data bit of the protected delay line
// as the word moves on to the next register.
//
// Bit k of word j is inverted when both the vertical-parity mismatch of word j
// (Errv_j) and the horizontal-parity mismatch of bit position k (Errh_k) are
// set: the upset bit sits at the crossing of the failing row and column. The
// corrected word B'_j is what the next register loads and what the filter
// arithmetic reads.
//
// Purely combinational. The per-bit crossing rule is the published one. Using
// the corrected words for the arithmetic as well is this design's choice; it
// keeps the filter output right in the cycle the upset is seen.
module data_corrector
  import ft_fir_pkg::*;
#(
  parameter int W = DATA_W,
  parameter int N = NTAPS6
) (
  input  logic [N-1:0][W-1:0] data_i,
  input  logic [N-1:0]        errv_i,
  input  logic [W-1:0]        errh_i,
  output logic [N-1:0][W-1:0] data_o
);

  always_comb begin
    for (int j = 0; j < N; j++)
      data_o[j] = data_i[j] ^ ({W{errv_i[j]}} & errh_i);
  end

endmodule
