// tb_data_corrector: self-checking test of the crossing-point correction.
//
// Drives random words with random Errv/Errh patterns (mostly a single row and
// column, sometimes none or several) and checks every output bit: it must be
// the inverse of the input bit exactly when its column and row both flag a
// mismatch.
module tb_data_corrector;
  localparam int W = 8;
  localparam int N = 6;

  logic [N-1:0][W-1:0] din, dout;
  logic [N-1:0] ev;
  logic [W-1:0] eh;
  int checks = 0, failures = 0;

  data_corrector #(.W(W), .N(N)) dut (.data_i(din), .errv_i(ev), .errh_i(eh), .data_o(dout));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int j = 0; j < N; j++) din[j] = W'($urandom);
      case (t % 4)
        0: begin ev = '0; eh = '0; end
        1, 2: begin ev = N'(1) << $urandom_range(N-1); eh = W'(1) << $urandom_range(W-1); end
        default: begin ev = N'($urandom); eh = W'($urandom); end
      endcase
      #1;
      for (int j = 0; j < N; j++)
        for (int k = 0; k < W; k++) begin
          logic exp_bit;
          exp_bit = (ev[j] && eh[k]) ? !din[j][k] : din[j][k];
          checks++;
          if (dout[j][k] !== exp_bit) begin
            failures++;
            if (failures < 10) $display("FAIL word %0d bit %0d", j, k);
          end
        end
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
