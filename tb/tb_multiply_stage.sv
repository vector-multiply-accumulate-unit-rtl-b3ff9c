// tb_multiply_stage: the multiply stage fed by two operand decoders. For
// random posit / IEEE operands in every layout the product element
// (-1)^s * m * 2^(sf - (lane width - 5)) must equal the exact product of the
// reference values, and the zero, NaR, signalling (invalid) and infinity
// flags must follow the special-value rules (0 * inf is invalid).
module tb_multiply_stage;
  import vmac_pkg::*;
  import vmac_ref_pkg::*;
  logic [1:0]  pre;
  logic        vec, fa, fb;
  logic [2:0]  ea, eb;
  logic [31:0] xa, xb;
  fields_t     da, db;
  prod_t       p;
  layout_e     lay;
  int checks = 0, failures = 0;
  decode_stage u_da (.pre(pre), .vec(vec), .fmt(fa), .es(ea), .x(xa), .d(da));
  decode_stage u_db (.pre(pre), .vec(vec), .fmt(fb), .es(eb), .x(xb), .d(db));
  multiply_stage dut (.lay(lay), .a(da), .b(db), .p(p));
  assign lay = layout_of(pre, vec);

  function automatic bit special(logic [31:0] v, int n, logic f, output real r, input int e,
                                 output bit nr, output bit inf);
    nr = 0; inf = 0; r = 0.0;
    if (f) begin
      nr = f_is_nan(64'(v), n); inf = f_is_inf(64'(v), n);
      if (!nr && !inf) r = f2r(64'(v), n);
    end else begin
      nr = p_is_nar(64'(v), n);
      if (!nr) r = p2r(64'(v), n, e);
    end
    return nr | inf;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int ne, pw, n;
      pre = (t % 3 == 0) ? 2'b00 : (t % 3 == 1) ? 2'b10 : 2'b11;
      vec = ($urandom_range(0, 4) == 0);
      fa = 1'($urandom); fb = 1'($urandom);
      ea = 3'($urandom_range(0, 3)); eb = 3'($urandom_range(0, 3));
      xa = $urandom; xb = $urandom;
      if (t % 8 == 0) xa = 32'h0;
      if (t % 8 == 1) begin fb = 1'b1; xb = 32'h7f80_7c00; end
      if (t % 8 == 2) begin fa = 1'b0; xa = 32'h8000_8080; end
      #1;
      ne = nelem(lay); pw = 64 / ne; n = nbits_of(pre);
      for (int e = 0; e < ne; e++) begin
        logic [31:0] a_e, b_e;
        real ra, rb, got;
        bit  na, ia, nb, ib, sa, sb, zr, nr, sn, inf;
        longint unsigned ml;
        a_e = (n == 32) ? xa : ((xa >> (e * n)) & ((32'd1 << n) - 1));
        b_e = (n == 32) ? xb : ((xb >> (e * n)) & ((32'd1 << n) - 1));
        sa = special(a_e, n, fa, ra, es_eff(ea, n), na, ia);
        sb = special(b_e, n, fb, rb, es_eff(eb, n), nb, ib);
        zr = (!sa && ra == 0.0) || (!sb && rb == 0.0);
        if (!fa && !na && a_e != 0) zr = zr && !(ra == 0.0 && a_e != 0);
        if (!fb && !nb && b_e != 0) zr = zr && !(rb == 0.0 && b_e != 0);
        ml = (p.m >> (e * pw)) & ((pw == 64) ? 64'hffff_ffff_ffff_ffff : ((64'd1 << pw) - 1));
        got = real'(ml) * pow2(sext((p.sf >> (e * (32 / ne))) &
                  ((ne == 1) ? 32'hffff_ffff : ((32'd1 << (32 / ne)) - 1)), 32 / ne) - (pw - 5));
        if (lane_flag(p.s, e, ne)) got = -got;
        checks++;
        if (sa || sb) begin
          // special operands: check the flags only
          nr  = (na && !fa) || (nb && !fb) || (na && fa && a_e[ieee_m(n)-1]) || (nb && fb && b_e[ieee_m(n)-1]);
          sn  = (na && fa && !a_e[ieee_m(n)-1]) || (nb && fb && !b_e[ieee_m(n)-1]) ||
                (ia && !sb && rb == 0.0) || (ib && !sa && ra == 0.0);
          inf = (ia || ib) && !nr && !sn;
          if (lane_flag(p.nar, e, ne) != nr || lane_flag(p.snan, e, ne) != sn ||
              lane_flag(p.inf, e, ne) != inf) begin
            failures++;
            $display("FAIL special pre=%b e=%0d a=%h b=%h nar=%b snan=%b inf=%b", pre, e, a_e, b_e, p.nar, p.snan, p.inf);
          end
        end else if (lane_flag(p.z, e, ne) != zr || (!zr && got != ra * rb) ||
                     lane_flag(p.s, e, ne) != (a_e[n-1] ^ b_e[n-1])) begin
          failures++;
          $display("FAIL pre=%b vec=%b e=%0d a=%h(%g) b=%h(%g) got=%g z=%b", pre, vec, e, a_e, ra, b_e, rb, got, p.z);
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
