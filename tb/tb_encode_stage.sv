// tb_encode_stage: the result format bit selects the posit or IEEE-754
// encoding. Random normalised elements are checked against the reference in
// both formats; for posit results every special input (NaR, NaN, invalid,
// infinity) must give NaR with all IEEE flags clear, and for IEEE results the
// flags must follow the rounding.
module tb_encode_stage;
  import vmac_pkg::*;
  import vmac_ref_pkg::*;
  logic [1:0]  pre;
  logic        vec, fmt;
  logic [2:0]  es;
  norm_t       r;
  logic [31:0] y;
  logic [3:0]  nv, of, uf, nx;
  int checks = 0, failures = 0;
  encode_stage dut (.pre(pre), .vec(vec), .fmt(fmt), .es(es), .r(r), .y(y), .nv(nv), .of(of), .uf(uf), .nx(nx));
`include "tb_enc_common.svh"
  initial begin
    for (int t = 0; t < 4000; t++) begin
      int ne, n, ev, lo, hi;
      real v [4];
      pre = (t % 3 == 0) ? 2'b00 : (t % 3 == 1) ? 2'b10 : 2'b11;
      vec = ($urandom_range(0, 4) == 0);
      fmt = 1'($urandom);
      es  = 3'($urandom_range(0, 3));
      ne = nelem(layout_of(pre, vec)); n = nbits_of(pre); ev = es_eff(es, n);
      hi = ieee_bias(n) + 2;
      lo = 1 - ieee_bias(n) - ieee_m(n) - 3;
      r = '0;
      for (int e = 0; e < ne; e++) rand_norm(r, e, ne, lo, hi, v[e]);
      case (t % 12)
        0: r.inf = 4'hf;
        1: r.nar = 4'hf;
        2: r.snan = 4'hf;
        default: ;
      endcase
      #1;
      for (int e = 0; e < ne; e++) begin
        fres_t fr;
        logic [31:0] eb;
        bit ev_nv, special;
        special = lane_flag(r.inf, e, ne) | lane_flag(r.nar, e, ne) | lane_flag(r.snan, e, ne);
        fr.of = 0; fr.uf = 0; fr.nx = 0; ev_nv = 0;
        if (!fmt) begin
          fr.bits = special ? (64'd1 << (n - 1)) : r2p(v[e], n, ev);
        end else if (lane_flag(r.snan, e, ne)) begin fr.bits = f_qnan(n); ev_nv = 1; end
        else if (lane_flag(r.nar, e, ne)) fr.bits = f_qnan(n);
        else if (lane_flag(r.inf, e, ne))
          fr.bits = (64'(lane_flag(r.s, e, ne)) << (n - 1)) | (((64'd1 << ieee_e(n)) - 1) << ieee_m(n));
        else fr = r2f(v[e], n, 0);
        eb = get32(y, e, n);
        checks++;
        if (64'(eb) != fr.bits || lane_flag(nv, e, ne) != ev_nv || lane_flag(of, e, ne) != fr.of ||
            lane_flag(uf, e, ne) != fr.uf || lane_flag(nx, e, ne) != fr.nx) begin
          failures++;
          $display("FAIL fmt=%b pre=%b vec=%b e=%0d v=%g y=%h exp=%h", fmt, pre, vec, e, v[e], eb, fr.bits);
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
