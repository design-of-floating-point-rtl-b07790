// tb_csa_add3: self-check of the three-operand carry save adder at two
// widths (8 bits exhaustively on a grid, 32 bits randomly) against x+y+z.
module tb_csa_add3;
  logic [7:0]  x8, y8, z8;
  logic [9:0]  s8;
  logic [31:0] x, y, z;
  logic [33:0] s;
  int checks = 0, failures = 0;

  csa_add3 #(.W(8)) dut8  (.x(x8), .y(y8), .z(z8), .s(s8));
  csa_add3          dut32 (.x(x),  .y(y),  .z(z),  .s(s));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i += 5)
      for (int j = 0; j < 256; j += 7)
        for (int k = 0; k < 256; k += 17) begin
          x8 = 8'(i); y8 = 8'(j); z8 = 8'(k);
          #1;
          checks++;
          if (s8 !== 10'(i + j + k)) begin
            failures++;
            if (failures < 10) $display("FAIL8 %0d+%0d+%0d got %0d", i, j, k, s8);
          end
        end
    x = '1; y = '1; z = '1;
    #1;
    checks++;
    if (s !== 34'h2_FFFF_FFFD) begin
      failures++;
      $display("FAIL all-ones got %h", s);
    end
    for (int n = 0; n < 5000; n++) begin
      x = $urandom; y = $urandom; z = $urandom;
      #1;
      checks++;
      if (s !== 34'(x) + 34'(y) + 34'(z)) begin
        failures++;
        if (failures < 10) $display("FAIL32 %h+%h+%h got %h", x, y, z, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
