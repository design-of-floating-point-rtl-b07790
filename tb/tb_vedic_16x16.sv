// tb_vedic_16x16: self-check of the 16x16 Vedic multiplier against
// integer multiplication: corner operands (0, 1, all ones, single bits,
// alternating patterns) in all pairings, then random operands.
module tb_vedic_16x16;
  logic [15:0] a, b;
  logic [31:0] q;
  logic [31:0] expect_q;
  logic [15:0] corner [8];
  int checks = 0, failures = 0;

  vedic_16x16 dut (.a(a), .b(b), .q(q));

  task automatic check();
    #1;
    expect_q = 32'(a) * 32'(b);
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
    corner[1] = 16'(1);
    corner[2] = '1;
    corner[3] = {1'b1, {(16-1){1'b0}}};
    corner[4] = {(16/2){2'b10}};
    corner[5] = {(16/2){2'b01}};
    corner[6] = {{(16/2){1'b0}}, {(16/2){1'b1}}};
    corner[7] = {{(16/2){1'b1}}, {(16/2){1'b0}}};
    foreach (corner[i]) foreach (corner[j]) begin
      a = corner[i]; b = corner[j]; check();
    end
    for (int k = 0; k < 20000; k++) begin
      a = 16'($urandom); b = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
