// tb_ieee_decode: random and directed check of the vector IEEE-754 decoder
// (FP32, FP16, 8-bit 1-4-3) including subnormals and special values. Each
// finite element (-1)^s * f * 2^(sf - (lane width - 3)) must equal the
// reference value, and the zero / infinity / quiet NaN / signalling NaN flags
// must match.
module tb_ieee_decode;
  import vmac_pkg::*;
  import vmac_ref_pkg::*;
  logic [1:0]  pre;
  logic        vec;
  logic [31:0] x, sf, f;
  logic [3:0]  s, z, qnan, snan, inf;
  int checks = 0, failures = 0;
  ieee_decode dut (.pre(pre), .vec(vec), .x(x), .s(s), .sf(sf), .f(f), .z(z), .qnan(qnan), .snan(snan), .inf(inf));
  initial begin
    for (int t = 0; t < 3000; t++) begin
      int ne, ew, n;
      pre = (t % 3 == 0) ? 2'b00 : (t % 3 == 1) ? 2'b10 : 2'b11;
      vec = ($urandom_range(0, 4) == 0);
      x   = $urandom;
      case (t % 12)
        0: x = (pre == 2'b00) ? 32'h7f80_0000 : (pre == 2'b10) ? 32'h7c00_fc00 : 32'h78f8_7879;
        1: x = (pre == 2'b00) ? 32'h7fc0_0001 : (pre == 2'b10) ? 32'h7e01_7c01 : 32'h7c7a_fc79;
        2: x = (pre == 2'b00) ? 32'h0000_0001 : (pre == 2'b10) ? 32'h0001_83ff : 32'h0107_8000;
        3: x = x & 32'h807f_807f;   // subnormals
        default: ;
      endcase
      #1;
      ne = nelem(layout_of(pre, vec)); ew = 32 / ne; n = nbits_of(pre);
      for (int e = 0; e < ne; e++) begin
        logic [31:0] xe;
        real r, got;
        bit  nan_, inf_, qn, zr;
        xe = (n == 32) ? x : ((x >> (e * n)) & ((32'd1 << n) - 1));
        nan_ = f_is_nan(64'(xe), n);
        inf_ = f_is_inf(64'(xe), n);
        qn   = nan_ && xe[ieee_m(n) - 1];
        r    = (nan_ || inf_) ? 0.0 : f2r(64'(xe), n);
        zr   = !nan_ && !inf_ && (r == 0.0);
        got = real'((f >> (e * ew)) & ((ew == 32) ? 32'hffff_ffff : ((32'd1 << ew) - 1))) *
              pow2(sext((sf >> (e * ew)) & ((ew == 32) ? 32'hffff_ffff : ((32'd1 << ew) - 1)), ew) - (ew - 3));
        if (lane_flag(s, e, ne)) got = -got;
        checks++;
        if (lane_flag(qnan, e, ne) != qn || lane_flag(snan, e, ne) != (nan_ && !qn) ||
            lane_flag(inf, e, ne) != inf_ || lane_flag(z, e, ne) != zr ||
            lane_flag(s, e, ne) != xe[n-1] ||
            (!nan_ && !inf_ && got != r)) begin
          failures++;
          $display("FAIL pre=%b vec=%b e=%0d x=%h got=%g exp=%g", pre, vec, e, xe, got, r);
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
