// parity_syndrome: compares the stored two-dimensional parity of the protected
// delay line with the parity of the words it now holds.
//
// For every delay-line word j it recomputes the XOR of the word's bits and
// compares it with the stored vertical parity Pv_j, giving Errv_j. For every
// bit position k it recomputes the XOR of bit k across all N words and compares
// it with the stored horizontal parity Ph_k, giving Errh_k. Errv (errv_any_o)
// is set when any Errv_j is set. The class output names the error scenario:
// one Errv and one Errh is a single data-bit upset at their crossing, Errh
// alone is an upset in a Ph register, Errv alone an upset in a Pv register,
// anything else is a multiple upset.
//
// Purely combinational. Even parity (a parity bit equals the XOR of the bits
// it covers). The comparisons and the crossing rule follow the published
// technique; the parity sense, the OR that forms Errv and the class output are
// this design's choices.
module parity_syndrome
  import ft_fir_pkg::*;
#(
  parameter int W = DATA_W,
  parameter int N = NTAPS6
) (
  input  logic [N-1:0][W-1:0] data_i,    // data_i[j][k] is bit k of word j
  input  logic [N-1:0]        pv_i,      // stored vertical parity per word
  input  logic [W-1:0]        ph_i,      // stored horizontal parity per bit
  output logic [N-1:0]        errv_o,
  output logic [W-1:0]        errh_o,
  output logic                errv_any_o,
  output err_class_e          class_o
);

  logic [W-1:0] row_par;
  int unsigned  nv, nh;

  always_comb begin
    row_par = '0;
    for (int j = 0; j < N; j++) begin
      errv_o[j] = pv_i[j] ^ (^data_i[j]);
      row_par   = row_par ^ data_i[j];
    end
    errh_o     = ph_i ^ row_par;
    errv_any_o = |errv_o;

    nv = 0;
    nh = 0;
    for (int j = 0; j < N; j++) nv += 32'(errv_o[j]);
    for (int k = 0; k < W; k++) nh += 32'(errh_o[k]);

    if (nv == 0 && nh == 0)      class_o = ERR_NONE;
    else if (nv == 1 && nh == 1) class_o = ERR_DATA;
    else if (nv == 0 && nh == 1) class_o = ERR_PH;
    else if (nv == 1 && nh == 0) class_o = ERR_PV;
    else                         class_o = ERR_MULTI;
  end

endmodule
