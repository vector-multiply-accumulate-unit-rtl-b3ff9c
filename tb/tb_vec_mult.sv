// tb_vec_mult: random check of the vectorised Booth multiplier. Each element
// product (1x32 -> 64, 2x16 -> 32, 4x8 -> 16 bits) must equal the integer
// product of the element operands, placed in its double-width lane.
module tb_vec_mult;
  import vmac_pkg::*;
  layout_e     mode;
  logic [31:0] a, b;
  logic [63:0] p;
  int checks = 0, failures = 0;
  vec_mult dut (.mode(mode), .a(a), .b(b), .p(p));
  initial begin
    for (int t = 0; t < 900; t++) begin
      int ne, ew;
      mode = layout_e'(t % 3);
      a = $urandom; b = $urandom;
      if (t % 17 == 0) begin a = '1; b = '1; end
      #1;
      ne = nelem(mode); ew = 32 / ne;
      for (int e = 0; e < ne; e++) begin
        longint unsigned ae, be, pe, m2;
        ae = (a >> (e * ew)) & ((64'd1 << ew) - 1);
        be = (b >> (e * ew)) & ((64'd1 << ew) - 1);
        m2 = (ew == 32) ? 64'hffff_ffff_ffff_ffff : ((64'd1 << (2 * ew)) - 1);
        pe = (p >> (e * 2 * ew)) & m2;
        checks++;
        if (pe != ae * be) begin
          failures++;
          $display("FAIL mode=%0d e=%0d a=%h b=%h p=%h", mode, e, a, b, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) #10;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
