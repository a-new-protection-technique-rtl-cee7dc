// tb_ph_bank: self-checking test of the horizontal-parity register bank.
//
// Drives random entering and leaving words, Errh/Errv patterns and upset
// masks, and checks after every clock that each Ph bit equals a reference
// kept here: toggled by the entering and the leaving bit, inverted when its
// Errh is set with Errv clear, and flipped by an injected upset. Reset must
// clear the bank.
module tb_ph_bank;
  localparam int W = 8;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] x, leave, errh, seu, ph, ref_ph;
  logic errv_any;
  int checks = 0, failures = 0;
  int n_fix = 0;

  ph_bank #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .x_i(x), .leave_i(leave),
    .errv_any_i(errv_any), .errh_i(errh), .seu_i(seu), .ph_o(ph));

  always #5 clk = ~clk;

  initial begin
    x = '0; leave = '0; errh = '0; seu = '0; errv_any = 0;
    ref_ph = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (ph !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      x = W'($urandom); leave = W'($urandom);
      errh = ($urandom_range(3) == 0) ? W'($urandom) : '0;
      errv_any = $urandom_range(1) == 1;
      seu = ($urandom_range(7) == 0) ? W'(1) << $urandom_range(W-1) : '0;
      for (int k = 0; k < W; k++) begin
        logic b;
        b = ref_ph[k] ^ x[k] ^ leave[k] ^ seu[k];
        if (errh[k] && !errv_any) begin b = ~b; n_fix++; end
        ref_ph[k] = b;
      end
      @(negedge clk);
      checks++;
      if (ph !== ref_ph) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d ph=%b exp=%b", t, ph, ref_ph);
      end
    end
    checks++;
    if (n_fix == 0) begin failures++; $display("FAIL no correction exercised"); end
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
