// tb_fir_sym_datapath: self-checking test of the folded symmetric FIR
// arithmetic.
//
// Two instances: the 6-tap filter {-1,24,50,50,24,-1} with SHIFT 7 and the
// 10-tap filter {-1,3,50,64,96,96,64,50,3,-1} with SHIFT 9. Random and extreme
// tap values are applied and the registered output is compared, one clock
// later, with the unfolded sum h[i]*x[n-i] worked out here, scaled and
// saturated. Saturation must occur in both directions.
module tb_fir_sym_datapath;
  import ft_fir_pkg::*;
  localparam int W = 8;

  logic clk = 0, rst_n = 0;
  logic [5:0][W-1:0] taps6;
  logic [9:0][W-1:0] taps10;
  logic [W-1:0] y6, y10;
  logic sat6, sat10;
  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0;

  fir_sym_datapath #(.W(W), .N(6), .COEF(COEF6), .OUT_W(W), .SHIFT(7)) dut6 (
    .clk(clk), .rst_n(rst_n), .taps_i(taps6), .y_o(y6), .sat_o(sat6));
  fir_sym_datapath #(.W(W), .N(10), .COEF(COEF10), .OUT_W(W), .SHIFT(9)) dut10 (
    .clk(clk), .rst_n(rst_n), .taps_i(taps10), .y_o(y10), .sat_o(sat10));

  always #5 clk = ~clk;

  localparam int H6 [6] = '{-1, 24, 50, 50, 24, -1};
  localparam int H10 [10] = '{-1, 3, 50, 64, 96, 96, 64, 50, 3, -1};

  function automatic void ref_out(int sum, int shift, output logic [W-1:0] y, output logic s);
    int q;
    q = sum >>> shift;
    s = 1'b0;
    if (q > 127) begin q = 127; s = 1'b1; end
    if (q < -128) begin q = -128; s = 1'b1; end
    y = W'(q);
  endfunction

  initial begin
    logic [W-1:0] e6, e10;
    logic s6, s10;
    taps6 = '0; taps10 = '0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (y6 !== '0 || y10 !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int sum6, sum10, v;
      sum6 = 0; sum10 = 0;
      for (int i = 0; i < 10; i++) begin
        case (t % 5)
          0: v = 127;
          1: v = -128;
          default: v = $signed(W'($urandom));
        endcase
        if (t % 5 == 4 && i % 2 == 0) v = -v / 2;
        if (i < 6) begin taps6[i] = W'(v); sum6 += H6[i] * v; end
        taps10[i] = W'(v); sum10 += H10[i] * v;
      end
      ref_out(sum6, 7, e6, s6);
      ref_out(sum10, 9, e10, s10);
      @(negedge clk);
      checks += 2;
      if (y6 !== e6 || sat6 !== s6) begin
        failures++;
        if (failures < 10) $display("FAIL 6-tap t=%0d y=%0d exp=%0d", t, $signed(y6), $signed(e6));
      end
      if (y10 !== e10 || sat10 !== s10) begin
        failures++;
        if (failures < 10) $display("FAIL 10-tap t=%0d y=%0d exp=%0d", t, $signed(y10), $signed(e10));
      end
      if (s6 && e6 == 8'h7f) n_sat_hi++;
      if (s6 && e6 == 8'h80) n_sat_lo++;
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
