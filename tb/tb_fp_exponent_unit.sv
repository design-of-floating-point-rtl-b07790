// tb_fp_exponent_unit: exhaustive self-check of the exponent adder over all
// 65536 exponent pairs against ea + eb - 127, plus the published example
// values (0x86 + 0x80 -> 0x87, 0x82 + 0x7D -> 0x80).
module tb_fp_exponent_unit;
  logic        [7:0] ea, eb;
  logic signed [9:0] exp_in;
  int checks = 0, failures = 0;

  fp_exponent_unit dut (.ea(ea), .eb(eb), .exp_in(exp_in));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ea = 8'h86; eb = 8'h80; #1;
    checks++;
    if (exp_in !== 10'sh087) begin failures++; $display("FAIL case I %h", exp_in); end
    ea = 8'h82; eb = 8'h7D; #1;
    checks++;
    if (exp_in !== 10'sh080) begin failures++; $display("FAIL case II %h", exp_in); end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        ea = 8'(i); eb = 8'(j);
        #1;
        checks++;
        if (int'(exp_in) != i + j - 127) begin
          failures++;
          if (failures < 10) $display("FAIL %0d+%0d got %0d", i, j, exp_in);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
