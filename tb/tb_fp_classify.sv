// tb_fp_classify: self-check of operand unpacking and classification on the
// published example operands, signed zeros, infinities, NaNs, a subnormal
// and random normal numbers.
module tb_fp_classify;
  import fpmul_pkg::*;
  logic [31:0]  x;
  fp_unpacked_t f;
  int checks = 0, failures = 0;

  fp_classify dut (.x(x), .f(f));

  task automatic expect_f(input logic [31:0] xin, input logic s, input logic [7:0] e,
                          input logic [31:0] sig, input logic z, input logic inf,
                          input logic nan);
    x = xin;
    #1;
    checks++;
    if (f.sign !== s || f.exp !== e || f.sig !== sig || f.is_zero !== z ||
        f.is_inf !== inf || f.is_nan !== nan) begin
      failures++;
      $display("FAIL x=%h got s=%b e=%h sig=%h z=%b inf=%b nan=%b", xin, f.sign, f.exp,
               f.sig, f.is_zero, f.is_inf, f.is_nan);
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
    logic [31:0] r;
    // 134.0625 and -2.25: A_EXP 86, A_SIG 00861000; B_EXP 80, B_SIG 00900000
    expect_f(32'h4306_1000, 1'b0, 8'h86, 32'h0086_1000, 1'b0, 1'b0, 1'b0);
    expect_f(32'hC010_0000, 1'b1, 8'h80, 32'h0090_0000, 1'b0, 1'b0, 1'b0);
    // -14.5 and -0.375: A_EXP 82, A_SIG 00E80000; B_EXP 7D, B_SIG 00C00000
    expect_f(32'hC168_0000, 1'b1, 8'h82, 32'h00E8_0000, 1'b0, 1'b0, 1'b0);
    expect_f(32'hBEC0_0000, 1'b1, 8'h7D, 32'h00C0_0000, 1'b0, 1'b0, 1'b0);
    expect_f(32'h0000_0000, 1'b0, 8'h00, 32'h0,         1'b1, 1'b0, 1'b0);
    expect_f(32'h8000_0000, 1'b1, 8'h00, 32'h0,         1'b1, 1'b0, 1'b0);
    expect_f(32'h0000_0123, 1'b0, 8'h00, 32'h0,         1'b1, 1'b0, 1'b0);
    expect_f(32'h7F80_0000, 1'b0, 8'hFF, 32'h0080_0000, 1'b0, 1'b1, 1'b0);
    expect_f(32'hFF80_0000, 1'b1, 8'hFF, 32'h0080_0000, 1'b0, 1'b1, 1'b0);
    expect_f(32'h7FC0_0000, 1'b0, 8'hFF, 32'h00C0_0000, 1'b0, 1'b0, 1'b1);
    expect_f(32'hFF80_0001, 1'b1, 8'hFF, 32'h0080_0001, 1'b0, 1'b0, 1'b1);
    for (int n = 0; n < 1000; n++) begin
      r = $urandom;
      r[30:23] = 8'(1 + ($urandom % 254));
      expect_f(r, r[31], r[30:23], {8'h00, 1'b1, r[22:0]}, 1'b0, 1'b0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
