// ph_bank: the horizontal-parity registers Ph of the protected delay line.
//
// Ph_k holds the XOR of bit k of every word in the delay line. Each clock the
// line shifts one word in and one word out, so Ph_k toggles by the XOR of bit
// k of the entering word (x_i) and of the leaving, already corrected, word
// (leave_i). When Errh_k is set and no word shows a vertical mismatch
// (errv_any_i low), the mismatch can only come from an upset in Ph_k itself,
// and Ph_k is inverted as well.
//
// Interface: x_i, leave_i, errh_i and errv_any_i are sampled on the rising
// edge of clk; ph_o is the register contents. rst_n is a synchronous
// active-low reset to zero, the parity of an all-zero line. seu_i is a
// simulation fault-injection mask XORed into the register as it is written
// (tie to zero in use).
//
// The update and correction rule follows the published technique; the reset
// and the injection input are this design's own.
module ph_bank
  import ft_fir_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x_i,
  input  logic [W-1:0] leave_i,
  input  logic         errv_any_i,
  input  logic [W-1:0] errh_i,
  input  logic [W-1:0] seu_i,
  output logic [W-1:0] ph_o
);

  logic [W-1:0] ph_q;
  logic [W-1:0] fix;

  assign fix = errh_i & {W{~errv_any_i}};

  always_ff @(posedge clk) begin
    if (!rst_n) ph_q <= '0;
    else        ph_q <= (ph_q ^ fix ^ x_i ^ leave_i) ^ seu_i;
  end

  assign ph_o = ph_q;

endmodule
