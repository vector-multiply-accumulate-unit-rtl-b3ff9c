// tb_quire_scale: the quire scale stage fed by decoders and the multiply
// stage. For random operands and every operation the quire images of the
// product and of Vc, read as signed lane integer * 2^(sfq - F) with
// F = lane/2 - 4 fraction bits, must equal the exact product and Vc with
// the operation's sign applied; scale factors beyond the integer field must
// be moved into the quire scale factor instead of the shift.
module tb_quire_scale;
  import vmac_pkg::*;
  import vmac_ref_pkg::*;
  logic [1:0]  pre;
  logic        vec, fa, fb, fc;
  logic [2:0]  ea, eb, ec, op;
  logic [31:0] xa, xb, xc;
  fields_t     da, db, dc;
  prod_t       p;
  quire_t      qp, qc;
  layout_e     lay;
  int checks = 0, failures = 0, nsat = 0;
  decode_stage u_da (.pre(pre), .vec(vec), .fmt(fa), .es(ea), .x(xa), .d(da));
  decode_stage u_db (.pre(pre), .vec(vec), .fmt(fb), .es(eb), .x(xb), .d(db));
  decode_stage u_dc (.pre(pre), .vec(vec), .fmt(fc), .es(ec), .x(xc), .d(dc));
  multiply_stage u_mul (.lay(lay), .a(da), .b(db), .p(p));
  quire_scale dut (.lay(lay), .op(op), .p(p), .c(dc), .qp(qp), .qc(qc));
  assign lay = layout_of(pre, vec);

  function automatic real qval(logic [127:0] q, logic [31:0] sfq, int e, int ne);
    int qw, ew;
    logic [127:0] l;
    real r;
    qw = 128 / ne; ew = 32 / ne;
    l = (q >> (e * qw)) & ((qw == 128) ? {128{1'b1}} : ((128'd1 << qw) - 1));
    if (l[qw-1]) begin
      l = ((~l) + 1) & ((qw == 128) ? {128{1'b1}} : ((128'd1 << qw) - 1));
      r = -real'(l);
    end else r = real'(l);
    return r * pow2(sext((sfq >> (e * ew)) & ((ew == 32) ? 32'hffff_ffff : ((32'd1 << ew) - 1)), ew)
                    - (qw / 2 - 4));
  endfunction

  function automatic real val(logic [31:0] v, int n, logic f, int e);
    return f ? f2r(64'(v), n) : p2r(64'(v), n, e);
  endfunction

  initial begin
    logic [2:0] ops [5] = '{3'b000, 3'b001, 3'b010, 3'b100, 3'b101};
    for (int t = 0; t < 3000; t++) begin
      int ne, n;
      pre = (t % 3 == 0) ? 2'b00 : (t % 3 == 1) ? 2'b10 : 2'b11;
      vec = ($urandom_range(0, 4) == 0);
      op  = ops[$urandom_range(0, 4)];
      fa = 1'($urandom); fb = 1'($urandom); fc = 1'($urandom);
      ea = 3'($urandom_range(0, 2)); eb = 3'($urandom_range(0, 2)); ec = 3'($urandom_range(0, 2));
      xa = $urandom; xb = $urandom; xc = $urandom;
      if (t % 10 == 0) xc = 32'h0;
      #1;
      ne = nelem(lay); n = nbits_of(pre);
      for (int e = 0; e < ne; e++) begin
        logic [31:0] a_e, b_e, c_e;
        real ra, rb, rc, gp, gc, ep, ec_;
        bit  bad;
        a_e = (n == 32) ? xa : ((xa >> (e * n)) & ((32'd1 << n) - 1));
        b_e = (n == 32) ? xb : ((xb >> (e * n)) & ((32'd1 << n) - 1));
        c_e = (n == 32) ? xc : ((xc >> (e * n)) & ((32'd1 << n) - 1));
        bad = fa ? (f_is_nan(64'(a_e), n) || f_is_inf(64'(a_e), n)) : p_is_nar(64'(a_e), n);
        bad |= fb ? (f_is_nan(64'(b_e), n) || f_is_inf(64'(b_e), n)) : p_is_nar(64'(b_e), n);
        bad |= fc ? (f_is_nan(64'(c_e), n) || f_is_inf(64'(c_e), n)) : p_is_nar(64'(c_e), n);
        if (bad) continue;
        ra = val(a_e, n, fa, es_eff(ea, n));
        rb = val(b_e, n, fb, es_eff(eb, n));
        rc = val(c_e, n, fc, es_eff(ec, n));
        ep = ra * rb; if (op[0] && op[2]) ep = -ep;
        ec_ = rc;     if (op[0]) ec_ = -ec_;
        if (rabs(ep) >= pow2((128 / ne) / 2 - 4)) nsat++;
        gp = qval(qp.q, qp.sfq, e, ne);
        gc = qval(qc.q, qc.sfq, e, ne);
        checks++;
        if (gp != ep || gc != ec_) begin
          failures++;
          $display("FAIL op=%b pre=%b vec=%b e=%0d p: got %g exp %g  c: got %g exp %g", op, pre, vec, e, gp, ep, gc, ec_);
        end
      end
    end
    checks++;
    if (nsat == 0) begin
      failures++;
      $display("FAIL quire scale-factor saturation never exercised");
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
