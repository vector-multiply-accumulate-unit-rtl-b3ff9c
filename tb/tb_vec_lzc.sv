// tb_vec_lzc: random and directed check of the vector leading-zero counter.
// For every layout each element's count must equal the number of leading
// zeros inside that element (the element width when it is all zero), and the
// all-zero flag must be set exactly for zero elements.
module tb_vec_lzc;
  import vmac_pkg::*;
  localparam int W = 32;
  localparam int CW = $clog2(W) + 1;
  layout_e            mode;
  logic [W-1:0]       x;
  logic [3:0][CW-1:0] cnt;
  logic [3:0]         allz;
  int checks = 0, failures = 0;
  vec_lzc #(.W(W)) dut (.mode(mode), .x(x), .cnt(cnt), .allz(allz));
  initial begin
    for (int t = 0; t < 900; t++) begin
      int ne, ew;
      mode = layout_e'(t % 3);
      // one random leading one position per element, random bits below it
      x = $urandom;
      x = x >> $urandom_range(0, W);
      if (t % 5 == 0) x = x & 32'hff00_ff00;
      if (t % 11 == 0) x = '0;
      #1;
      ne = nelem(mode); ew = W / ne;
      for (int e = 0; e < ne; e++) begin
        logic [W-1:0] v;
        int zc;
        v = (x >> (e * ew)) & ((ew == W) ? {W{1'b1}} : ((W'(1) << ew) - 1));
        zc = ew;
        for (int i = 0; i < ew; i++) if (v[i]) zc = ew - 1 - i;
        checks++;
        if (allz[e] != (v == 0) || (v != 0 && int'(cnt[e]) != zc)) begin
          failures++;
          $display("FAIL mode=%0d e=%0d x=%h cnt=%0d exp=%0d allz=%b", mode, e, x, cnt[e], zc, allz);
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
