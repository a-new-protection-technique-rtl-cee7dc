// ft_fir_top: low-pass FIR filter whose delay line is protected against single
// event upsets by a two-dimensional (vertical/horizontal) parity.
//
// The input sample x_i enters the protected delay line (ft_delay_line) on
// every rising clock edge. The line's N corrected words, x[n]..x[n-N+1] of the
// sample stream, feed the folded symmetric arithmetic (fir_sym_datapath),
// whose registered, scaled and saturated 8-bit result is y_o. With the default
// 6-tap coefficients {-1, 24, 50, 50, 24, -1} the filter holds 6x8 data bits,
// 6 Pv bits, 8 Ph bits and an unprotected 8-bit output register.
//
// Timing: a sample presented at x_i before edge t is in the line after t and
// first contributes to y_o after edge t+1: y_o = sat((sum h[i]*x[n-i]) >>>
// SHIFT) with x[n] the sample taken two edges earlier. A single upset in any
// data, Pv or Ph register is repaired at the next edge without disturbing
// y_o. errv_o, errh_o and class_o report the parity comparison of the current
// cycle. rst_n is a synchronous active-low reset. seu_*_i are simulation
// fault-injection masks (tie to zero in use).
//
// The structure, sizes and coefficients follow the published design; the
// number format, scaling, latency, reset and injection ports are this
// design's choices.
module ft_fir_top
  import ft_fir_pkg::*;
#(
  parameter int W     = DATA_W,
  parameter int N     = NTAPS6,
  parameter int COEF [N] = COEF6,
  parameter int SHIFT = 7
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W-1:0]        x_i,
  output logic [W-1:0]        y_o,
  output logic                sat_o,
  input  logic [N-1:0][W-1:0] seu_data_i,
  input  logic [N-1:0]        seu_pv_i,
  input  logic [W-1:0]        seu_ph_i,
  output logic [N-1:0]        errv_o,
  output logic [W-1:0]        errh_o,
  output err_class_e          class_o
);

  logic [N-1:0][W-1:0] taps;

  ft_delay_line #(.W(W), .N(N)) u_line (
    .clk        (clk),
    .rst_n      (rst_n),
    .x_i        (x_i),
    .seu_data_i (seu_data_i),
    .seu_pv_i   (seu_pv_i),
    .seu_ph_i   (seu_ph_i),
    .taps_o     (taps),
    .errv_o     (errv_o),
    .errh_o     (errh_o),
    .class_o    (class_o)
  );

  fir_sym_datapath #(.W(W), .N(N), .COEF(COEF), .OUT_W(W), .SHIFT(SHIFT)) u_dp (
    .clk    (clk),
    .rst_n  (rst_n),
    .taps_i (taps),
    .y_o    (y_o),
    .sat_o  (sat_o)
  );

endmodule
