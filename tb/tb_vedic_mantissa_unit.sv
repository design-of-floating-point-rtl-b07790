// tb_vedic_mantissa_unit: self-check of the significand multiplier. The
// published examples must give SIG_in = 28'h4B69000 (0x861000 * 0x900000)
// and 28'hAE00000 (0xE80000 * 0xC00000); random 24-bit significands with the
// hidden bit set are compared against bits 47..20 of their integer product.
module tb_vedic_mantissa_unit;
  logic [31:0] a_sig, b_sig;
  logic [27:0] sig_in;
  logic [47:0] p;
  int checks = 0, failures = 0;

  vedic_mantissa_unit dut (.a_sig(a_sig), .b_sig(b_sig), .sig_in(sig_in));

  task automatic check(input logic [27:0] want);
    #1;
    checks++;
    if (sig_in !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h got %h want %h", a_sig, b_sig, sig_in, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_sig = 32'h0086_1000; b_sig = 32'h0090_0000; check(28'h4B6_9000);
    a_sig = 32'h00E8_0000; b_sig = 32'h00C0_0000; check(28'hAE0_0000);
    a_sig = 32'h00FF_FFFF; b_sig = 32'h00FF_FFFF; check(28'hFFF_FFE0);
    a_sig = 32'h0080_0000; b_sig = 32'h0080_0000; check(28'h400_0000);
    for (int n = 0; n < 5000; n++) begin
      a_sig = {8'h00, 1'b1, 23'($urandom)};
      b_sig = {8'h00, 1'b1, 23'($urandom)};
      p = 48'(a_sig) * 48'(b_sig);
      check(p[47:20]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
