// tb_vedic_32x32: self-check of the 32x32 Vedic multiplier against
// integer multiplication: corner operands (0, 1, all ones, single bits,
// alternating patterns) in all pairings, then random operands.
module tb_vedic_32x32;
  logic [31:0] a, b;
  logic [63:0] q;
  logic [63:0] expect_q;
  logic [31:0] corner [8];
  int checks = 0, failures = 0;

  vedic_32x32 dut (.a(a), .b(b), .q(q));

  task automatic check();
    #1;
    expect_q = 64'(a) * 64'(b);
    checks++;
    if (q !== expect_q) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h got %h expected %h", a, b, q, expect_q);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    corner[0] = '0;
    corner[1] = 32'(1);
    corner[2] = '1;
    corner[3] = {1'b1, {(32-1){1'b0}}};
    corner[4] = {(32/2){2'b10}};
    corner[5] = {(32/2){2'b01}};
    corner[6] = {{(32/2){1'b0}}, {(32/2){1'b1}}};
    corner[7] = {{(32/2){1'b1}}, {(32/2){1'b0}}};
    foreach (corner[i]) foreach (corner[j]) begin
      a = corner[i]; b = corner[j]; check();
    end
    for (int k = 0; k < 20000; k++) begin
      a = 32'({$urandom, $urandom}); b = 32'({$urandom, $urandom});
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
