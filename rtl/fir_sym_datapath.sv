// fir_sym_datapath: arithmetic of a symmetric (linear-phase) FIR filter,
// y = sum_i h[i] * x[n-i], in folded form.
//
// Because h[i] = h[N-1-i], the two taps that share a coefficient are added
// first (one pre-adder per coefficient pair), so only ceil(N/2) constant
// multipliers are needed; for the 6-tap filter these are -1, 24 and 50. The
// products are summed at full precision, shifted right arithmetically by SHIFT
// and saturated to OUT_W bits, and the result is registered.
//
// Interface: taps_i[i] is x[n-i] as a W-bit two's complement sample. y_o is
// registered on the rising edge of clk (one clock after taps_i); sat_o is set
// for the samples whose scaled sum had to be clipped. rst_n is a synchronous
// active-low reset to zero.
//
// The folded structure and the coefficients follow the published filter. The
// signed number format, the SHIFT scaling and the saturation are this design's
// choices: the source gives only 8-bit input and output.
module fir_sym_datapath
  import ft_fir_pkg::*;
#(
  parameter int W     = DATA_W,
  parameter int N     = NTAPS6,
  parameter int COEF [N] = COEF6,
  parameter int OUT_W = DATA_W,
  parameter int SHIFT = 7
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0][W-1:0] taps_i,
  output logic [OUT_W-1:0]    y_o,
  output logic                sat_o
);

  localparam int NP = (N + 1) / 2;   // number of distinct coefficients
  localparam int AW = W + 1 + 16;    // accumulator width (|coef| sum < 2^15)

  // The folded form needs symmetric coefficients.
  for (genvar i = 0; i < N / 2; i++) begin : g_sym
    if (COEF[i] != COEF[N-1-i]) begin : g_err
      $error("fir_sym_datapath: coefficients must be symmetric");
    end
  end

  localparam logic signed [OUT_W-1:0] YMAX = {1'b0, {(OUT_W-1){1'b1}}};
  localparam logic signed [OUT_W-1:0] YMIN = {1'b1, {(OUT_W-1){1'b0}}};

  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] scaled;
  logic signed [OUT_W-1:0] y_d;
  logic sat_d;

  always_comb begin
    logic signed [W:0] pre;
    acc = '0;
    for (int i = 0; i < NP; i++) begin
      if (2 * i + 1 == N)
        pre = (W + 1)'(signed'(taps_i[i]));
      else
        pre = (W + 1)'(signed'(taps_i[i])) + (W + 1)'(signed'(taps_i[N-1-i]));
      acc = acc + AW'(pre) * AW'(COEF[i]);
    end
    scaled = acc >>> SHIFT;
    if (scaled > AW'(YMAX)) begin
      y_d = YMAX; sat_d = 1'b1;
    end else if (scaled < AW'(YMIN)) begin
      y_d = YMIN; sat_d = 1'b1;
    end else begin
      y_d = scaled[OUT_W-1:0]; sat_d = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_o   <= '0;
      sat_o <= 1'b0;
    end else begin
      y_o   <= y_d;
      sat_o <= sat_d;
    end
  end

endmodule
