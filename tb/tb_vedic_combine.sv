// tb_vedic_combine: self-check of the partial-product combiner. Random
// 16-bit operand halves give the four products ll, lh, hl, hh; the
// combined 64-bit result must equal the full 32x32 product. A second
// instance with N=4 is checked over all 4-bit operand pairs.
module tb_vedic_combine;
  logic [15:0] al, ah, bl, bh;
  logic [31:0] ll, lh, hl, hh;
  logic [63:0] q;
  logic [1:0]  al4, ah4, bl4, bh4;
  logic [3:0]  ll4, lh4, hl4, hh4;
  logic [7:0]  q4;
  int checks = 0, failures = 0;

  vedic_combine          dut   (.ll(ll), .lh(lh), .hl(hl), .hh(hh), .q(q));
  vedic_combine #(.N(4)) dut4  (.ll(ll4), .lh(lh4), .hl(hl4), .hh(hh4), .q(q4));

  assign ll = 32'(al) * 32'(bl);
  assign lh = 32'(al) * 32'(bh);
  assign hl = 32'(ah) * 32'(bl);
  assign hh = 32'(ah) * 32'(bh);
  assign ll4 = 4'(al4) * 4'(bl4);
  assign lh4 = 4'(al4) * 4'(bh4);
  assign hl4 = 4'(ah4) * 4'(bl4);
  assign hh4 = 4'(ah4) * 4'(bh4);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        {ah4, al4} = 4'(i); {bh4, bl4} = 4'(j);
        #1;
        checks++;
        if (q4 !== 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL4 %0d*%0d got %0d", i, j, q4);
        end
      end
    {ah, al} = '1; {bh, bl} = '1;
    #1;
    checks++;
    if (q !== 64'hFFFF_FFFE_0000_0001) begin
      failures++;
      $display("FAIL all-ones got %h", q);
    end
    for (int n = 0; n < 20000; n++) begin
      {ah, al} = $urandom; {bh, bl} = $urandom;
      #1;
      checks++;
      if (q !== 64'({ah, al}) * 64'({bh, bl})) begin
        failures++;
        if (failures < 10) $display("FAIL %h*%h got %h", {ah, al}, {bh, bl}, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
