// tb_posit_decode: random and directed check of the vector posit decoder for
// 4x8, 2x16, 1x32 and the scalar modes with every exponent size. Each decoded
// element (-1)^s * f * 2^(sf - (lane width - 3)) must equal the posit's value
// from the reference model, and the zero and NaR flags must match.
module tb_posit_decode;
  import vmac_pkg::*;
  import vmac_ref_pkg::*;
  logic [1:0]  pre;
  logic        vec;
  logic [2:0]  es;
  logic [31:0] x, sf, f;
  logic [3:0]  s, z, nar;
  int checks = 0, failures = 0;
  posit_decode dut (.pre(pre), .vec(vec), .es(es), .x(x), .s(s), .sf(sf), .f(f), .z(z), .nar(nar));
  initial begin
    for (int t = 0; t < 3000; t++) begin
      int ne, ew, n, ev;
      pre = (t % 3 == 0) ? 2'b00 : (t % 3 == 1) ? 2'b10 : 2'b11;
      vec = ($urandom_range(0, 4) == 0);
      es  = 3'($urandom);
      x   = $urandom;
      if (t % 9 == 0) x = 32'h8000_8080;
      if (t % 9 == 1) x = 32'h0000_0000;
      if (t % 9 == 2) x = 32'h7fff_7f7f;
      if (t % 9 == 3) x = 32'h0001_0101;
      #1;
      ne = nelem(layout_of(pre, vec)); ew = 32 / ne; n = nbits_of(pre);
      ev = es_eff(es, n);
      for (int e = 0; e < ne; e++) begin
        logic [31:0] xe;
        real r, got;
        bit  isnar, iszero;
        xe = (n == 32) ? x : ((x >> (e * n)) & ((32'd1 << n) - 1));
        isnar = p_is_nar(64'(xe), n);
        iszero = (xe == 0);
        r = isnar ? 0.0 : p2r(64'(xe), n, ev);
        got = real'((f >> (e * ew)) & ((ew == 32) ? 32'hffff_ffff : ((32'd1 << ew) - 1))) *
              pow2(sext((sf >> (e * ew)) & ((ew == 32) ? 32'hffff_ffff : ((32'd1 << ew) - 1)), ew) - (ew - 3));
        if (lane_flag(s, e, ne)) got = -got;
        checks++;
        if (lane_flag(nar, e, ne) != isnar || lane_flag(z, e, ne) != iszero ||
            (!isnar && !iszero && got != r)) begin
          failures++;
          $display("FAIL pre=%b vec=%b es=%0d e=%0d x=%h got=%g exp=%g z=%b nar=%b", pre, vec, es, e, xe, got, r, z, nar);
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
