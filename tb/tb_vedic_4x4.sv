// tb_vedic_4x4: exhaustive self-check of the 4x4 Vedic multiplier
// against integer multiplication over all 256 input pairs.
module tb_vedic_4x4;
  logic [3:0] a, b;
  logic [7:0] q;
  int checks = 0, failures = 0;

  vedic_4x4 dut (.a(a), .b(b), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (q !== 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d got %0d", i, j, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
