// tb_ft_fir_top10: the upset-injection experiment of tb_ft_fir_top repeated on
// the 10-tap configuration (coefficients {-1,3,50,64,96,96,64,50,3,-1},
// 10 data words with 10 Pv bits, 8 Ph bits, SHIFT 9 so the DC gain 424/512
// stays below one).
//
// 15000 samples of pulses plus noise and 100 single upsets, at most one per
// clock and at least N+2 clocks apart, into random data, Pv and Ph registers.
// Every output is compared with a reference filter computed from the clean
// input; the reported scenario is checked after each upset. Data correction,
// Ph correction and a Pv upset must each happen at least once. With a DC gain
// below one this input never saturates, so saturation is not required here.
module tb_ft_fir_top10;
  import ft_fir_pkg::*;
  localparam int W = DATA_W;
  localparam int N = NTAPS10;
  localparam int SHIFT = 9;
  localparam int NSAMP = 15000;
  localparam int NSEU = 100;
  localparam int SLOT = NSAMP / NSEU;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] x, y;
  logic sat;
  logic [N-1:0][W-1:0] seu_data;
  logic [N-1:0] seu_pv, errv;
  logic [W-1:0] seu_ph, errh;
  err_class_e cls;

  int checks = 0, failures = 0;
  int n_data = 0, n_ph = 0, n_pv = 0, n_sat = 0, n_seu = 0;

  ft_fir_top #(.W(W), .N(N), .COEF(COEF10), .SHIFT(SHIFT)) dut (.clk(clk), .rst_n(rst_n), .x_i(x), .y_o(y), .sat_o(sat),
    .seu_data_i(seu_data), .seu_pv_i(seu_pv), .seu_ph_i(seu_ph),
    .errv_o(errv), .errh_o(errh), .class_o(cls));

  always #5 clk = ~clk;

  localparam int H [N] = '{-1, 3, 50, 64, 96, 96, 64, 50, 3, -1};

  // Reference: y = sat((sum h[i]*x[n-i]) >>> SHIFT).
  function automatic logic [W-1:0] ref_y(int hist [N]);
    int s;
    s = 0;
    for (int i = 0; i < N; i++) s += H[i] * hist[i];
    s = s >>> SHIFT;
    if (s > 127) s = 127;
    if (s < -128) s = -128;
    return W'(s);
  endfunction

  // Pulses plus noise: rectangular pulses of random height and width on a
  // small random noise floor.
  int pulse_left = 0, pulse_amp = 0;
  function automatic int next_sample();
    int v;
    if (pulse_left == 0 && $urandom_range(19) == 0) begin
      pulse_left = 3 + $urandom_range(20);
      pulse_amp = $urandom_range(1) ? $urandom_range(120) : -$urandom_range(120);
    end
    v = $signed(4'($urandom));
    if (pulse_left > 0) begin
      v += pulse_amp;
      pulse_left--;
    end
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  initial begin
    int hist [N];
    logic [W-1:0] exp_y;
    int seu_at, tgt, j, k, prev_class_cycle;
    err_class_e exp_cls;
    bit pending_cls;

    x = '0; seu_data = '0; seu_pv = '0; seu_ph = '0;
    for (int i = 0; i < N; i++) hist[i] = 0;
    exp_y = '0;
    pending_cls = 0;
    exp_cls = ERR_NONE;
    seu_at = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int t = 0; t < NSAMP + 2; t++) begin
      int v;
      // choose this slot's upset instant
      if (t % SLOT == 0 && t / SLOT < NSEU) seu_at = t + $urandom_range(SLOT - N - 3);
      v = (t < NSAMP) ? next_sample() : 0;
      x = W'(v);
      if (t == seu_at) begin
        n_seu++;
        j = $urandom_range(N-1); k = $urandom_range(W-1);
        tgt = (n_seu <= 3) ? n_seu - 1 : (($urandom_range(N*W + N + W - 1) < N*W) ? 0 :
              ($urandom_range(N + W - 1) < N ? 1 : 2));
        case (tgt)
          0: begin seu_data[j][k] = 1'b1; exp_cls = ERR_DATA; n_data++; end
          1: begin seu_pv[j] = 1'b1; exp_cls = ERR_PV; n_pv++; end
          default: begin seu_ph[k] = 1'b1; exp_cls = ERR_PH; n_ph++; end
        endcase
        pending_cls = 1;
      end else if (!pending_cls) begin
        exp_cls = ERR_NONE;
      end
      @(negedge clk);
      seu_data = '0; seu_pv = '0; seu_ph = '0;
      // output after this edge comes from the line contents before it
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d y=%0d exp=%0d", t, $signed(y), $signed(exp_y));
      end
      if (sat) n_sat++;
      // the line now holds the sample taken at this edge
      for (int i = N-1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = v;
      exp_y = ref_y(hist);
      // scenario reported in the cycle after an upset
      checks++;
      if (cls !== exp_cls) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d class=%0d exp=%0d", t, cls, exp_cls);
      end
      if (pending_cls) begin
        pending_cls = 0;
        // a Pv upset stays visible until its word leaves the line
        if (exp_cls == ERR_PV && j < N-1) begin
          pending_cls = 1;
          j++;
        end
      end
    end

    $display("upsets=%0d data=%0d ph=%0d pv=%0d saturated outputs=%0d", n_seu, n_data, n_ph, n_pv, n_sat);
    checks++;
    if (n_seu != NSEU) begin failures++; $display("FAIL %0d upsets injected", n_seu); end
    checks++;
    if (n_data == 0) begin failures++; $display("FAIL no data correction"); end
    checks++;
    if (n_ph == 0) begin failures++; $display("FAIL no Ph correction"); end
    checks++;
    if (n_pv == 0) begin failures++; $display("FAIL no Pv upset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NSAMP + 100) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
