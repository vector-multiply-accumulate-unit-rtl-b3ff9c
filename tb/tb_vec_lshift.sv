// tb_vec_lshift: random check of the per-element left barrel shifter at
// the quire width. Every element is shifted by its own amount (0 up to past
// the element width); no bit may cross an element boundary.
module tb_vec_lshift;
  import vmac_pkg::*;
  localparam int W = 128;
  localparam int CW = $clog2(W) + 1;
  layout_e            mode;
  logic [W-1:0]       x, y;
  logic [3:0][CW-1:0] sh;

  int checks = 0, failures = 0;
  vec_lshift #(.W(W)) dut (.mode(mode), .x(x), .sh(sh), .y(y));
  initial begin
    for (int t = 0; t < 900; t++) begin
      int ne, ew;
      mode = layout_e'(t % 3);
      x = {$urandom, $urandom, $urandom, $urandom};
      ne = nelem(mode); ew = W / ne;
      for (int e = 0; e < 4; e++) sh[e] = CW'($urandom_range(0, ew + 2));
      if (t % 13 == 0) for (int e = 0; e < 4; e++) sh[e] = '0;
      #1;
      for (int e = 0; e < ne; e++) begin
        logic [W-1:0] m, v, r;
        logic         st;
        int           s;
        m = (ew == W) ? {W{1'b1}} : ((W'(1) << ew) - 1);
        v = (x >> (e * ew)) & m;
        s = int'(sh[e]);
        st = 1'b0;
        r = (s >= ew) ? '0 : ((v << s) & m);
        checks++;
        if (((y >> (e * ew)) & m) != r) begin
          failures++;
          $display("FAIL mode=%0d e=%0d sh=%0d x=%h y=%h", mode, e, s, x, y);
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
