// tb_ft_delay_line: self-checking test of the parity-protected delay line.
//
// Shifts random samples through the line and compares the corrected taps with
// an ideal shift register every cycle. Every 10 cycles one upset is injected
// into a random data, Pv or Ph register; the test checks the Errv/Errh pattern
// and scenario the next cycle shows, that the taps stay right, and that the
// parities agree again before the next upset. At the end it exercises the
// cases the scheme is documented to handle or not handle: an odd number of
// upsets in one word (corrected), two upsets in different words (reported as
// multiple) and a Pv upset followed by a Ph upset (taken for a data upset and
// mis-corrected, the known weakness).
module tb_ft_delay_line;
  import ft_fir_pkg::*;
  localparam int W = 8;
  localparam int N = 6;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] x;
  logic [N-1:0][W-1:0] seu_data, taps;
  logic [N-1:0] seu_pv, errv;
  logic [W-1:0] seu_ph, errh;
  err_class_e cls;

  logic [N-1:0][W-1:0] ref_line;
  int checks = 0, failures = 0;
  int n_data = 0, n_pv = 0, n_ph = 0;

  ft_delay_line #(.W(W), .N(N)) dut (.clk(clk), .rst_n(rst_n), .x_i(x),
    .seu_data_i(seu_data), .seu_pv_i(seu_pv), .seu_ph_i(seu_ph),
    .taps_o(taps), .errv_o(errv), .errh_o(errh), .class_o(cls));

  always #5 clk = ~clk;

  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endfunction

  // One clock: present x (and the upset masks) before the edge, update the
  // reference, return after the edge.
  task automatic step(logic [W-1:0] xv);
    x = xv;
    @(negedge clk);
    seu_data = '0; seu_pv = '0; seu_ph = '0;
    for (int j = N-1; j > 0; j--) ref_line[j] = ref_line[j-1];
    ref_line[0] = xv;
  endtask

  task automatic do_reset();
    rst_n = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    ref_line = '0;
  endtask

  initial begin
    int j, k, j2, k2, tgt;
    x = '0; seu_data = '0; seu_pv = '0; seu_ph = '0; ref_line = '0;
    @(negedge clk); @(negedge clk);
    check(taps == '0 && cls == ERR_NONE, "reset state");
    rst_n = 1;

    for (int ev = 0; ev < 300; ev++) begin
      j = $urandom_range(N-1); k = $urandom_range(W-1);
      tgt = (ev < 3) ? ev : $urandom_range(2);
      case (tgt)
        0: seu_data[j][k] = 1'b1;
        1: seu_pv[j] = 1'b1;
        default: seu_ph[k] = 1'b1;
      endcase
      step(W'($urandom));
      check(taps == ref_line, "taps right in the upset cycle");
      case (tgt)
        0: begin
          n_data++;
          check(cls == ERR_DATA && errv == (N'(1) << j) && errh == (W'(1) << k), "data upset located");
        end
        1: begin
          n_pv++;
          check(cls == ERR_PV && errv == (N'(1) << j) && errh == '0, "Pv upset located");
        end
        default: begin
          n_ph++;
          check(cls == ERR_PH && errv == '0 && errh == (W'(1) << k), "Ph upset located");
        end
      endcase
      for (int c = 0; c < 9; c++) begin
        step(W'($urandom));
        check(taps == ref_line, "taps right");
      end
      check(cls == ERR_NONE, "parities agree again");
    end
    check(n_data > 0 && n_pv > 0 && n_ph > 0, "all upset targets exercised");

    // Three upsets in one word: one Errv, three Errh, all three corrected.
    j = 2;
    seu_data[j] = 8'b0010_0101;
    step(8'h5a);
    check(cls == ERR_MULTI && errv == (N'(1) << j) && errh == 8'b0010_0101, "odd upsets in one word seen");
    check(taps == ref_line, "odd upsets in one word corrected");
    for (int c = 0; c < N + 2; c++) step(W'($urandom));
    check(cls == ERR_NONE && taps == ref_line, "recovered after odd upsets in one word");

    // Two upsets in different words and rows: reported, not locatable.
    seu_data[1][3] = 1'b1; seu_data[4][6] = 1'b1;
    step(8'h11);
    check(cls == ERR_MULTI && errv == 6'b010010 && errh == 8'b0100_1000, "double upset reported");
    do_reset();

    // Pv upset, then a Ph upset one cycle later: taken for a data upset.
    seu_pv[0] = 1'b1;
    step(8'h33);
    check(cls == ERR_PV, "Pv upset before Ph upset");
    seu_ph[5] = 1'b1;
    step(8'h44);
    check(cls == ERR_DATA && errv == 6'b000010 && errh == 8'b0010_0000, "Pv+Ph looks like data upset");
    check(taps[1] == (ref_line[1] ^ 8'b0010_0000), "Pv+Ph mis-corrects the crossing bit");
    do_reset();
    step(8'h01);
    check(cls == ERR_NONE && taps == ref_line, "clean after reset");

    $display("upsets: data=%0d pv=%0d ph=%0d", n_data, n_pv, n_ph);
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
