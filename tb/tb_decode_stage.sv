// tb_decode_stage: random check of the unified operand decoder. The format
// bit selects posit or IEEE-754 decoding; the decoded element value, sign,
// zero, NaR (posit NaR or IEEE quiet NaN), signalling NaN and infinity flags
// are compared with the reference model.
module tb_decode_stage;
  import vmac_pkg::*;
  import vmac_ref_pkg::*;
  logic [1:0]  pre;
  logic        vec, fmt;
  logic [2:0]  es;
  logic [31:0] x;
  fields_t     d;
  int checks = 0, failures = 0;
  decode_stage dut (.pre(pre), .vec(vec), .fmt(fmt), .es(es), .x(x), .d(d));
  initial begin
    for (int t = 0; t < 3000; t++) begin
      int ne, ew, n, ev;
      pre = (t % 3 == 0) ? 2'b00 : (t % 3 == 1) ? 2'b10 : 2'b11;
      vec = ($urandom_range(0, 4) == 0);
      fmt = 1'($urandom);
      es  = 3'($urandom);
      x   = $urandom;
      if (t % 10 == 0) x = 32'h7f80_7c80;
      if (t % 10 == 1) x = 32'h7fc0_7e7c;
      if (t % 10 == 2) x = 32'h7f80_0001;
      #1;
      ne = nelem(layout_of(pre, vec)); ew = 32 / ne; n = nbits_of(pre);
      ev = es_eff(es, n);
      for (int e = 0; e < ne; e++) begin
        logic [31:0] xe;
        real r, got;
        bit  nr, sn, in_, zr;
        xe = (n == 32) ? x : ((x >> (e * n)) & ((32'd1 << n) - 1));
        if (fmt) begin
          nr  = f_is_nan(64'(xe), n) && xe[ieee_m(n) - 1];
          sn  = f_is_nan(64'(xe), n) && !xe[ieee_m(n) - 1];
          in_ = f_is_inf(64'(xe), n);
          r   = (nr || sn || in_) ? 0.0 : f2r(64'(xe), n);
        end else begin
          nr  = p_is_nar(64'(xe), n);
          sn  = 0; in_ = 0;
          r   = nr ? 0.0 : p2r(64'(xe), n, ev);
        end
        zr = fmt ? (!nr && !sn && !in_ && r == 0.0) : (xe == 0);
        got = real'((d.f >> (e * ew)) & ((ew == 32) ? 32'hffff_ffff : ((32'd1 << ew) - 1))) *
              pow2(sext((d.sf >> (e * ew)) & ((ew == 32) ? 32'hffff_ffff : ((32'd1 << ew) - 1)), ew) - (ew - 3));
        if (lane_flag(d.s, e, ne)) got = -got;
        checks++;
        if (lane_flag(d.nar, e, ne) != nr || lane_flag(d.snan, e, ne) != sn ||
            lane_flag(d.inf, e, ne) != in_ || lane_flag(d.z, e, ne) != zr ||
            (!nr && !sn && !in_ && got != r)) begin
          failures++;
          $display("FAIL fmt=%b pre=%b vec=%b es=%0d e=%0d x=%h got=%g exp=%g", fmt, pre, vec, es, e, xe, got, r);
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
