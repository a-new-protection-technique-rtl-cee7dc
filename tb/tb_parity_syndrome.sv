// tb_parity_syndrome: self-checking test of the two-dimensional parity
// comparison.
//
// Builds delay-line contents with consistent parities, then flips one data
// bit, one Pv, one Ph, or several bits, and checks Errv/Errh bit by bit and
// the reported scenario against values worked out here independently. Also
// checks fully random inputs against a bit-serial reference.
module tb_parity_syndrome;
  import ft_fir_pkg::*;
  localparam int W = 8;
  localparam int N = 6;

  logic [N-1:0][W-1:0] data;
  logic [N-1:0] pv;
  logic [W-1:0] ph;
  logic [N-1:0] errv;
  logic [W-1:0] errh;
  logic errv_any;
  err_class_e cls;
  int checks = 0, failures = 0;

  parity_syndrome #(.W(W), .N(N)) dut (
    .data_i(data), .pv_i(pv), .ph_i(ph), .errv_o(errv), .errh_o(errh),
    .errv_any_o(errv_any), .class_o(cls));

  task automatic make_clean();
    for (int j = 0; j < N; j++) data[j] = W'($urandom);
    for (int j = 0; j < N; j++) begin
      pv[j] = 1'b0;
      for (int k = 0; k < W; k++) pv[j] = pv[j] ^ data[j][k];
    end
    for (int k = 0; k < W; k++) begin
      ph[k] = 1'b0;
      for (int j = 0; j < N; j++) ph[k] = ph[k] ^ data[j][k];
    end
  endtask

  task automatic expect_state(logic [N-1:0] ev, logic [W-1:0] eh, err_class_e ec, string what);
    #1;
    checks++;
    if (errv !== ev || errh !== eh || errv_any !== (ev != 0) || cls !== ec) begin
      failures++;
      $display("FAIL %s: errv=%b/%b errh=%b/%b any=%b class=%0d/%0d", what, errv, ev, errh, eh,
               errv_any, cls, ec);
    end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      int j, k, j2, k2;
      make_clean();
      expect_state('0, '0, ERR_NONE, "clean");
      j = $urandom_range(N-1); k = $urandom_range(W-1);
      // single data upset
      data[j][k] = ~data[j][k];
      expect_state(N'(1) << j, W'(1) << k, ERR_DATA, "data");
      data[j][k] = ~data[j][k];
      // single Pv upset
      pv[j] = ~pv[j];
      expect_state(N'(1) << j, '0, ERR_PV, "pv");
      pv[j] = ~pv[j];
      // single Ph upset
      ph[k] = ~ph[k];
      expect_state('0, W'(1) << k, ERR_PH, "ph");
      ph[k] = ~ph[k];
      // two data upsets in different rows and columns
      j2 = (j + 1 + $urandom_range(N-2)) % N; k2 = (k + 1 + $urandom_range(W-2)) % W;
      data[j][k] = ~data[j][k]; data[j2][k2] = ~data[j2][k2];
      expect_state((N'(1) << j) | (N'(1) << j2), (W'(1) << k) | (W'(1) << k2), ERR_MULTI, "double");
      data[j][k] = ~data[j][k]; data[j2][k2] = ~data[j2][k2];
      // two upsets in one word, same column: only Ph bits disagree
      data[j][k] = ~data[j][k]; data[j][k2] = ~data[j][k2];
      expect_state('0, (W'(1) << k) | (W'(1) << k2), ERR_MULTI, "double same word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
