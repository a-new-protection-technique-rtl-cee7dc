// ft_delay_line: FIR delay line protected against single event upsets by a
// two-dimensional parity.
//
// N registers of W bits hold the last N input samples; word 0 is the newest.
// Each word carries a vertical parity bit Pv, computed once when the sample
// enters and shifted along with it. A bank of W horizontal parity bits Ph
// (ph_bank) holds, for every bit position, the parity of that bit across all
// N words; it is kept current as words enter and leave. Every cycle
// parity_syndrome recomputes both parities and compares them with the stored
// ones:
//   - one word and one bit position disagree: the bit at their crossing has
//     flipped; data_corrector inverts it as the word moves to the next
//     register (and on taps_o);
//   - only a Ph disagrees: that Ph has flipped and ph_bank inverts it;
//   - only a Pv disagrees: that Pv has flipped; it is not repaired and leaves
//     the line with its word.
// Two or more simultaneous upsets are reported on class_o but cannot in
// general be located, so they may be left or mis-corrected.
//
// Timing: the line shifts on every rising clock edge. taps_o[j] is the
// corrected word j, i.e. the sample presented j+1 clocks earlier; it is
// combinational from the registers. rst_n is a synchronous active-low reset to
// an all-zero line (whose parities are all zero). seu_*_i are simulation
// fault-injection masks XORed into the data, Pv and Ph registers as they are
// written (tie to zero in use).
//
// The structure and correction rules follow the published technique. Even
// parity, the reset, the injection inputs and correcting the taps seen by the
// arithmetic are this design's choices. An assertion checks that a single
// data or Ph upset is repaired within one clock.
module ft_delay_line
  import ft_fir_pkg::*;
#(
  parameter int W = DATA_W,
  parameter int N = NTAPS6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W-1:0]        x_i,
  input  logic [N-1:0][W-1:0] seu_data_i,
  input  logic [N-1:0]        seu_pv_i,
  input  logic [W-1:0]        seu_ph_i,
  output logic [N-1:0][W-1:0] taps_o,
  output logic [N-1:0]        errv_o,
  output logic [W-1:0]        errh_o,
  output err_class_e          class_o
);

  logic [N-1:0][W-1:0] data_q;
  logic [N-1:0]        pv_q;
  logic [W-1:0]        ph;
  logic                errv_any;
  logic [N-1:0][W-1:0] corr;

  parity_syndrome #(.W(W), .N(N)) u_syndrome (
    .data_i     (data_q),
    .pv_i       (pv_q),
    .ph_i       (ph),
    .errv_o     (errv_o),
    .errh_o     (errh_o),
    .errv_any_o (errv_any),
    .class_o    (class_o)
  );

  data_corrector #(.W(W), .N(N)) u_corrector (
    .data_i (data_q),
    .errv_i (errv_o),
    .errh_i (errh_o),
    .data_o (corr)
  );

  ph_bank #(.W(W)) u_ph (
    .clk        (clk),
    .rst_n      (rst_n),
    .x_i        (x_i),
    .leave_i    (corr[N-1]),
    .errv_any_i (errv_any),
    .errh_i     (errh_o),
    .seu_i      (seu_ph_i),
    .ph_o       (ph)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_q <= '0;
      pv_q   <= '0;
    end else begin
      data_q[0] <= x_i ^ seu_data_i[0];
      pv_q[0]   <= (^x_i) ^ seu_pv_i[0];
      for (int j = 1; j < N; j++) begin
        data_q[j] <= corr[j-1] ^ seu_data_i[j];
        pv_q[j]   <= pv_q[j-1] ^ seu_pv_i[j];
      end
    end
  end

  assign taps_o = corr;

  // A single data or Ph upset is repaired at the next edge: unless a new upset
  // arrives, the parities agree again one clock later.
  logic seu_any;
  assign seu_any = (|seu_data_i) | (|seu_pv_i) | (|seu_ph_i);

  a_single_repaired: assert property (@(posedge clk) disable iff (!rst_n)
    ((class_o == ERR_DATA || class_o == ERR_PH) && !seu_any) |=> class_o == ERR_NONE)
    else $error("ft_delay_line: single upset not repaired");

endmodule
