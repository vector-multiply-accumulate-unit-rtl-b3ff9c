// tb_ieee_encode: random normalised elements (normal, subnormal, overflowing
// and underflowing ranges) are encoded to FP32 / FP16 / 8-bit floats and
// compared with the reference rounding: round to nearest even, subnormals,
// overflow to infinity, tininess detected after rounding, and the overflow,
// underflow and inexact flags. Zero, infinity, NaN and invalid inputs are
// checked as directed cases.
module tb_ieee_encode;
  import vmac_pkg::*;
  import vmac_ref_pkg::*;
  logic [1:0]  pre;
  logic        vec;
  norm_t       r;
  logic [31:0] y;
  logic [3:0]  nv, of, uf, nx;
  int checks = 0, failures = 0;
  ieee_encode dut (.pre(pre), .vec(vec), .r(r), .y(y), .nv(nv), .of(of), .uf(uf), .nx(nx));
`include "tb_enc_common.svh"
  initial begin
    for (int t = 0; t < 4000; t++) begin
      int ne, n, lo, hi;
      real v [4];
      pre = (t % 3 == 0) ? 2'b00 : (t % 3 == 1) ? 2'b10 : 2'b11;
      vec = ($urandom_range(0, 4) == 0);
      ne = nelem(layout_of(pre, vec)); n = nbits_of(pre);
      hi = ieee_bias(n) + 2;
      lo = 1 - ieee_bias(n) - ieee_m(n) - 3;
      r = '0;
      for (int e = 0; e < ne; e++) rand_norm(r, e, ne, lo, hi, v[e]);
      case (t % 16)
        0: r.z = 4'hf;
        1: r.inf = 4'hf;
        2: r.nar = 4'hf;
        3: r.snan = 4'hf;
        default: ;
      endcase
      #1;
      for (int e = 0; e < ne; e++) begin
        fres_t fr;
        logic [31:0] eb;
        bit sg, ev_nv;
        sg = lane_flag(r.s, e, ne);
        ev_nv = 0;
        fr.of = 0; fr.uf = 0; fr.nx = 0;
        if (lane_flag(r.snan, e, ne)) begin fr.bits = f_qnan(n); ev_nv = 1; end
        else if (lane_flag(r.nar, e, ne)) fr.bits = f_qnan(n);
        else if (lane_flag(r.inf, e, ne)) fr.bits = (64'(sg) << (n - 1)) | (((64'd1 << ieee_e(n)) - 1) << ieee_m(n));
        else if (lane_flag(r.z, e, ne)) fr.bits = 64'(sg) << (n - 1);
        else fr = r2f(v[e], n, 0);
        eb = get32(y, e, n);
        checks++;
        if (64'(eb) != fr.bits || lane_flag(nv, e, ne) != ev_nv || lane_flag(of, e, ne) != fr.of ||
            lane_flag(uf, e, ne) != fr.uf || lane_flag(nx, e, ne) != fr.nx) begin
          failures++;
          $display("FAIL pre=%b vec=%b e=%0d v=%g y=%h exp=%h of/uf/nx=%b%b%b exp=%b%b%b", pre, vec, e, v[e],
                   eb, fr.bits, lane_flag(of, e, ne), lane_flag(uf, e, ne), lane_flag(nx, e, ne), fr.of, fr.uf, fr.nx);
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
