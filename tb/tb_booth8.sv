// tb_booth8: exhaustive check of the 8x8 unsigned radix-4 Booth multiplier
// against the integer product for all 65536 operand pairs.
module tb_booth8;
  logic [7:0]  m, x;
  logic [15:0] p;
  int checks = 0, failures = 0;
  booth8 dut (.m(m), .x(x), .p(p));
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        m = 8'(i); x = 8'(j);
        #1;
        checks++;
        if (p != 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000000) #10;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
