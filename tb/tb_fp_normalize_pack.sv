// tb_fp_normalize_pack: self-check of normalisation, exception selection and
// packing. The published intermediate values must give the published results
// (SIG_in 4B69000 / EXP_in 87 -> 0xC396D200; SIG_in AE00000 / EXP_in 80 ->
// SIG_o 5700000, EXP_o 81, 0x40AE0000); overflow, underflow, the boundary
// exponents and every special-operand code are checked, then random inputs
// against a reference written here.
module tb_fp_normalize_pack;
  import fpmul_pkg::*;
  logic              sign;
  logic signed [9:0] exp_in;
  logic [27:0]       sig_in;
  fp_special_t       spec;
  logic [31:0]       z;
  fp_flags_t         flags;
  logic [7:0]        exp_o;
  logic [27:0]       sig_o;
  int checks = 0, failures = 0;

  fp_normalize_pack dut (.sign(sign), .exp_in(exp_in), .sig_in(sig_in), .spec(spec),
                         .z(z), .flags(flags), .exp_o(exp_o), .sig_o(sig_o));

  task automatic check(input logic [31:0] want_z, input logic [4:0] want_f);
    #1;
    checks++;
    if (z !== want_z || flags !== want_f) begin
      failures++;
      if (failures < 10)
        $display("FAIL s=%b e=%0d sig=%h spec=%b got %h/%b want %h/%b", sign, exp_in, sig_in,
                 spec, z, flags, want_z, want_f);
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
    int e;
    logic [22:0] fr;
    spec = '0;
    sign = 1'b1; exp_in = 10'sh087; sig_in = 28'h4B6_9000;
    check(32'hC396_D200, 5'b0);
    checks++;
    if (sig_o !== 28'h4B6_9000 || exp_o !== 8'h87) begin failures++; $display("FAIL case I sig_o"); end
    sign = 1'b0; exp_in = 10'sh080; sig_in = 28'hAE0_0000;
    check(32'h40AE_0000, 5'b0);
    checks++;
    if (sig_o !== 28'h570_0000 || exp_o !== 8'h81) begin failures++; $display("FAIL case II sig_o"); end
    // exponent boundaries (flags: invalid, overflow, underflow, inf, zero)
    sign = 1'b0; sig_in = 28'h400_0000;
    exp_in = 10'sd254; check(32'h7F00_0000, 5'b00000);
    exp_in = 10'sd255; check(32'h7F80_0000, 5'b01010);
    sig_in = 28'h800_0000;
    exp_in = 10'sd253; check(32'h7F00_0000, 5'b00000);
    exp_in = 10'sd254; check(32'h7F80_0000, 5'b01010);
    sign = 1'b1; sig_in = 28'h400_0000;
    exp_in = 10'sd1;   check(32'h8080_0000, 5'b00000);
    exp_in = 10'sd0;   check(32'h8000_0000, 5'b00101);
    exp_in = -10'sd100; check(32'h8000_0000, 5'b00101);
    sig_in = 28'h800_0000;
    exp_in = 10'sd0;   check(32'h8080_0000, 5'b00000);
    // specials take priority over everything
    spec = 3'b100; check(32'h7FC0_0000, 5'b10000);
    spec = 3'b010; check(32'hFF80_0000, 5'b00010);
    spec = 3'b001; check(32'h8000_0000, 5'b00001);
    spec = 3'b110; check(32'h7FC0_0000, 5'b10000);
    spec = '0;
    for (int n = 0; n < 5000; n++) begin
      sign   = 1'($urandom);
      exp_in = 10'(int'($urandom % 400) - 100);
      sig_in = {1'b0, 1'b1, 26'($urandom)};
      if ($urandom % 2 == 1) sig_in = {1'b1, 27'($urandom)};
      e  = int'(exp_in) + (sig_in[27] ? 1 : 0);
      fr = sig_in[27] ? sig_in[26:4] : sig_in[25:3];
      if (e >= 255)     check({sign, 8'hFF, 23'd0}, 5'b01010);
      else if (e <= 0)  check({sign, 31'd0}, 5'b00101);
      else              check({sign, 8'(e), fr}, 5'b00000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
