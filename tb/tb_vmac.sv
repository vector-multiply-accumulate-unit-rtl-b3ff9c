// tb_vmac: end-to-end self-checking test of the VMAC unit at its default size.
//
// Operations are streamed into the pipeline (mostly back to back, sometimes
// with bubbles) and every result is compared, element by element, with a
// real-number reference (vmac_ref_pkg) in the result's format, together with
// the IEEE status flags and the 6-cycle latency. Phases:
//   1. random Va*Vb+Vc, Va*Vb-Vc and Va*Vb in every layout (1x32, 2x16, 4x8,
//      8- and 16-bit scalars), posit and IEEE operands, mixed formats and
//      exponent sizes;
//   2. random dot products (accumulate / accumulate-subtract chains);
//   3. directed cases: IEEE overflow, underflow, subnormals, quire scale-factor
//      saturation, posit saturation, NaR / NaN / infinity handling, invalid
//      operations, signed zeros, quire overflow.
// Operands are drawn from ranges where the exact result fits a double and the
// reduced quire holds it without loss, so the expected value is exact.
// Each mechanism is counted; one that never occurs counts as a failure.
module tb_vmac;
  import vmac_pkg::*;
  import vmac_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [2:0]  op = '0;
  logic [1:0]  pre = '0;
  logic        vec = 1'b0;
  logic [3:0]  fmt = '0;
  logic [11:0] es = '0;
  logic [31:0] va = '0, vb = '0, vc = '0;
  logic        out_valid;
  logic [31:0] vr;
  logic [3:0]  f_nv, f_of, f_uf, f_nx;

  vmac dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .op(op), .pre(pre), .vec(vec),
    .fmt(fmt), .es(es), .va(va), .vb(vb), .vc(vc), .out_valid(out_valid), .vr(vr),
    .flag_nv(f_nv), .flag_of(f_of), .flag_uf(f_uf), .flag_nx(f_nx)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    logic [31:0] vr;
    logic [3:0]  nv, of, uf, nx;
    longint      t_in;
    string       tag;
  } exp_t;
  exp_t expq[$];

  localparam int NMECH = 22;
  int mech [NMECH];
  string mname [NMECH] = '{
    "layout_1x32", "layout_2x16", "layout_4x8", "scalar_8bit", "scalar_16bit",
    "op_fma", "op_fms", "op_mul", "op_acc", "op_accsub",
    "posit_result", "ieee_result", "cross_format", "quire_sf_saturation",
    "ieee_overflow", "ieee_underflow", "ieee_subnormal", "posit_saturation",
    "nar_nan_propagation", "invalid_operation", "quire_overflow_nar", "signed_zero"
  };

  real acc_ref [4];

  // ---------------- helpers ----------------
  function automatic int n_of(logic [1:0] p);
    return (p[1] == 1'b0) ? 32 : (p[0] ? 8 : 16);
  endfunction
  function automatic int ne_of(logic [1:0] p, logic v);
    return (p[1] == 1'b0 || v) ? 1 : (p[0] ? 4 : 2);
  endfunction
  function automatic int esr(logic [2:0] e, int n);
    return (n == 8) ? int'(e[1:0]) : int'(e);
  endfunction
  function automatic logic [31:0] el(logic [31:0] v, int e, int n);
    return (v >> (e * n)) & ((n == 32) ? 32'hffff_ffff : ((32'd1 << n) - 1));
  endfunction
  function automatic real val(logic [31:0] b, int n, logic f, int e);
    return f ? f2r(64'(b), n) : p2r(64'(b), n, e);
  endfunction
  function automatic logic [3:0] rep(bit b, int e, int ne);
    logic [3:0] r;
    r = '0;
    for (int i = 0; i < 4; i++) if (i / (4 / ne) == e) r[i] = b;
    return r;
  endfunction

  // Random finite non-zero operand with floor(log2|v|) in [lo, hi].
  function automatic logic [31:0] gen(int n, logic f, int e, int lo, int hi);
    logic [31:0] b;
    real v;
    int  k;
    for (int tries = 0; tries < 100000; tries++) begin
      b = $urandom;
      if (n < 32) b = b & ((32'd1 << n) - 1);
      else b = b & 32'hffff_f000;
      if (f) begin
        if (f_is_nan(64'(b), n) || f_is_inf(64'(b), n)) continue;
      end else if (p_is_nar(64'(b), n)) continue;
      v = val(b, n, f, e);
      if (v == 0.0) continue;
      k = ilog2(rabs(v));
      if (k >= lo && k <= hi) return b;
    end
    return '0;
  endfunction

  // Expected result of an operation on finite operands; updates acc_ref.
  function automatic exp_t model(logic [2:0] o, logic [1:0] p, logic v, logic [3:0] fm_,
                                 logic [11:0] e_, logic [31:0] a, logic [31:0] b,
                                 logic [31:0] c);
    exp_t x;
    int n, ne;
    n = n_of(p);
    ne = ne_of(p, v);
    x.vr = '0; x.nv = '0; x.of = '0; x.uf = '0; x.nx = '0;
    for (int i = 0; i < ne; i++) begin
      real ra, rb, rc, pr, r;
      ra = val(el(a, i, n), n, fm_[3], esr(e_[11:9], n));
      rb = val(el(b, i, n), n, fm_[2], esr(e_[8:6], n));
      rc = val(el(c, i, n), n, fm_[1], esr(e_[5:3], n));
      pr = ra * rb;
      case (o)
        OP_FMA:    r = pr + rc;
        OP_FMS:    r = pr - rc;
        OP_MUL:    r = pr;
        OP_ACC:    r = acc_ref[i] + pr;
        default:   r = acc_ref[i] - pr;
      endcase
      acc_ref[i] = r;
      if (rabs(pr) >= pow2((128 / ne) / 2 - 4)) mech[13]++;
      if (fm_[0]) begin
        fres_t fr;
        fr = r2f(r, n, (o == OP_MUL) && (pr == 0.0) && ((ra < 0.0) != (rb < 0.0)));
        x.vr |= 32'(fr.bits) << (i * n);
        x.of |= rep(fr.of, i, ne);
        x.uf |= rep(fr.uf, i, ne);
        x.nx |= rep(fr.nx, i, ne);
        if (fr.of) mech[14]++;
        if (fr.uf) mech[15]++;
        if (r != 0.0 && ((fr.bits >> ieee_m(n)) & ((1 << ieee_e(n)) - 1)) == 0) mech[16]++;
      end else begin
        longint unsigned pb;
        pb = r2p(r, n, esr(e_[2:0], n));
        x.vr |= 32'(pb) << (i * n);
        if (r != 0.0 && (pb == 1 || pb == (64'd1 << (n - 1)) - 1 ||
                         pb == (64'd1 << n) - 1 || pb == (64'd1 << (n - 1)) + 1) &&
            r != p2r(pb, n, esr(e_[2:0], n))) mech[17]++;
      end
    end
    return x;
  endfunction

  task automatic issue(logic [2:0] o, logic [1:0] p, logic v, logic [3:0] fm_,
                       logic [11:0] e_, logic [31:0] a, logic [31:0] b, logic [31:0] c,
                       exp_t x, string tag);
    @(negedge clk);
    in_valid = 1'b1; op = o; pre = p; vec = v; fmt = fm_; es = e_;
    va = a; vb = b; vc = c;
    x.t_in = cycle;
    x.tag = tag;
    expq.push_back(x);
    case (ne_of(p, v))
      1: if (p[1] && p[0]) mech[3]++; else if (p[1]) mech[4]++; else mech[0]++;
      2: mech[1]++;
      default: mech[2]++;
    endcase
    case (o)
      OP_FMA: mech[5]++;
      OP_FMS: mech[6]++;
      OP_MUL: mech[7]++;
      OP_ACC: mech[8]++;
      default: mech[9]++;
    endcase
    if (fm_[0]) mech[11]++; else mech[10]++;
    if (fm_[3] != fm_[0] || fm_[2] != fm_[0]) mech[12]++;
  endtask

  task automatic bubble();
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // Result checker, sampled away from the active clock edge.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t x;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected result %h", vr);
      end else begin
        x = expq.pop_front();
        if (vr !== x.vr || f_nv !== x.nv || f_of !== x.of || f_uf !== x.uf || f_nx !== x.nx) begin
          failures++;
          $display("FAIL [%s] vr=%h exp=%h flags nv/of/uf/nx=%h/%h/%h/%h exp=%h/%h/%h/%h",
                   x.tag, vr, x.vr, f_nv, f_of, f_uf, f_nx, x.nv, x.of, x.uf, x.nx);
        end
        checks++;
        if (cycle - x.t_in != 6) begin
          failures++;
          $display("FAIL [%s] latency %0d, expected 6", x.tag, cycle - x.t_in);
        end
      end
    end
  end

  // Random operation in a given precision / mode.
  task automatic rand_op(logic [2:0] o, logic [1:0] p, logic v, int lo, int hi, string tag);
    logic [3:0]  fm_;
    logic [11:0] e_;
    logic [31:0] a, b, c;
    int n, ne, emax;
    exp_t x;
    n = n_of(p);
    ne = ne_of(p, v);
    emax = (n == 8) ? 3 : (n == 16) ? 3 : 2;
    fm_ = 4'($urandom);
    for (int s = 0; s < 4; s++) e_[s*3 +: 3] = 3'($urandom_range(0, emax));
    e_[2:0] = 3'($urandom_range(0, (n == 8) ? 3 : 4));
    a = '0; b = '0; c = '0;
    for (int i = 0; i < ne; i++) begin
      a |= gen(n, fm_[3], esr(e_[11:9], n), lo, hi) << (i * n);
      b |= gen(n, fm_[2], esr(e_[8:6], n), lo, hi) << (i * n);
      if (o == OP_FMA || o == OP_FMS) c |= gen(n, fm_[1], esr(e_[5:3], n), lo, hi) << (i * n);
    end
    x = model(o, p, v, fm_, e_, a, b, c);
    issue(o, p, v, fm_, e_, a, b, c, x, tag);
  endtask

  // Directed operation with a hand-written expected result.
  task automatic dir_op(logic [2:0] o, logic [1:0] p, logic v, logic [3:0] fm_, logic [11:0] e_,
                        logic [31:0] a, logic [31:0] b, logic [31:0] c,
                        logic [31:0] r, logic [3:0] nv_, string tag);
    exp_t x;
    x.vr = r; x.nv = nv_; x.of = '0; x.uf = '0; x.nx = '0;
    issue(o, p, v, fm_, e_, a, b, c, x, tag);
  endtask

  // Directed operation on finite operands checked by the model.
  task automatic mod_op(logic [2:0] o, logic [1:0] p, logic v, logic [3:0] fm_, logic [11:0] e_,
                        logic [31:0] a, logic [31:0] b, logic [31:0] c, string tag);
    exp_t x;
    x = model(o, p, v, fm_, e_, a, b, c);
    issue(o, p, v, fm_, e_, a, b, c, x, tag);
  endtask

  // Range of floor(log2|operand|) kept exact by the quire of each layout.
  task automatic range_of(logic [1:0] p, logic v, output int lo, output int hi);
    int ne;
    ne = ne_of(p, v);
    if (ne == 4)      begin lo = -1; hi = 4; end
    else if (ne == 2) begin lo = -1; hi = 6; end
    else if (p[1])    begin lo = -6; hi = 6; end
    else              begin lo = -4; hi = 4; end
  endtask

  localparam int NRAND = 40;
  localparam int NACC  = 6;

  initial begin : main
    logic [1:0] pres [5] = '{2'b00, 2'b10, 2'b11, 2'b10, 2'b11};
    logic       vecs [5] = '{1'b0, 1'b0, 1'b0, 1'b1, 1'b1};
    int lo, hi;
    for (int i = 0; i < NMECH; i++) mech[i] = 0;
    for (int i = 0; i < 4; i++) acc_ref[i] = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- phase 1: random FMA / FMS / MUL ----
    for (int m = 0; m < 5; m++) begin
      range_of(pres[m], vecs[m], lo, hi);
      for (int t = 0; t < NRAND; t++) begin
        logic [2:0] o;
        o = (t % 3 == 0) ? OP_FMA : (t % 3 == 1) ? OP_FMS : OP_MUL;
        rand_op(o, pres[m], vecs[m], lo, hi, "random");
        if ($urandom_range(0, 7) == 0) bubble();
      end
    end

    // ---- phase 2: random dot products ----
    for (int m = 0; m < 5; m++) begin
      range_of(pres[m], vecs[m], lo, hi);
      for (int d = 0; d < 4; d++) begin
        rand_op(OP_FMA, pres[m], vecs[m], lo, hi, "acc-init");
        for (int t = 0; t < NACC; t++) begin
          rand_op(($urandom_range(0, 2) == 0) ? OP_ACCSUB : OP_ACC, pres[m], vecs[m], lo, hi, "acc");
          if ($urandom_range(0, 5) == 0) bubble();
        end
      end
    end

    // ---- phase 3: directed ----
    // IEEE FP16 overflow: 256 * 512 -> inf
    mod_op(OP_MUL, 2'b10, 1'b0, 4'hf, '0, 32'h5c00_5c00, 32'h6000_6000, 32'h0, "fp16-overflow");
    // FP16 underflow: (1+2^-10)*2^-10 * 2^-10 -> inexact subnormal
    mod_op(OP_MUL, 2'b10, 1'b0, 4'hf, '0, 32'h1401_1401, 32'h1400_1400, 32'h0, "fp16-underflow");
    // FP16 exact subnormal result and subnormal operand
    mod_op(OP_FMA, 2'b10, 1'b1, 4'hf, '0, 32'h0000_0003, 32'h3c00_3c00, 32'h0000_0001, "fp16-subnormal");
    // FP8 (1-4-3) subnormal result
    mod_op(OP_MUL, 2'b11, 1'b0, 4'hf, '0, 32'h1820_2818, 32'h1818_1818, 32'h0, "fp8-subnormal");
    // quire scale-factor saturation: FP32 2^40 * 2^30 + 2^69
    mod_op(OP_FMA, 2'b00, 1'b0, 4'hf, '0, 32'h5380_0000, 32'h4e80_0000, 32'h6200_0000, "quire-sat");
    // saturation in 2x16 posits: (2^20) * (2^20) with es=2 -> maxpos is 2^56
    mod_op(OP_FMA, 2'b10, 1'b0, 4'h0, 12'b010_010_010_010, 32'h7a00_7a00, 32'h7a00_7a00, 32'h7a00_7a00, "quire-sat-16");
    // posit saturation: 8-bit es=0, 16 * 16 -> maxpos (64)
    mod_op(OP_MUL, 2'b11, 1'b0, 4'h0, '0, 32'h7e7e_7e7e, 32'h7e7e_7e7e, 32'h0, "posit-maxpos");
    // posit minpos: 8-bit es=0, 1/32 * 1/32 -> minpos
    mod_op(OP_MUL, 2'b11, 1'b0, 4'h0, '0, 32'h0202_0202, 32'h0202_0202, 32'h0, "posit-minpos");
    // posit NaR propagation (8-bit): lane 0 NaR
    dir_op(OP_FMA, 2'b11, 1'b0, 4'h0, '0, 32'h4040_4080, 32'h4040_4040, 32'h0000_0000,
           32'h4040_4080, 4'h0, "posit-nar");
    mech[18]++;
    // IEEE FP32 qNaN operand -> canonical qNaN, no invalid
    dir_op(OP_FMA, 2'b00, 1'b0, 4'hf, '0, 32'h7fc0_1234, 32'h3f80_0000, 32'h3f80_0000,
           32'h7fc0_0000, 4'h0, "fp32-qnan");
    mech[18]++;
    // IEEE FP32 sNaN operand -> qNaN with invalid
    dir_op(OP_FMA, 2'b00, 1'b0, 4'hf, '0, 32'h7f80_0001, 32'h3f80_0000, 32'h3f80_0000,
           32'h7fc0_0000, 4'hf, "fp32-snan");
    mech[19]++;
    // 0 * inf -> invalid
    dir_op(OP_FMA, 2'b00, 1'b0, 4'hf, '0, 32'h0000_0000, 32'h7f80_0000, 32'h3f80_0000,
           32'h7fc0_0000, 4'hf, "fp32-0xinf");
    mech[19]++;
    // inf - inf -> invalid (FP16, both lanes)
    dir_op(OP_FMS, 2'b10, 1'b0, 4'hf, '0, 32'h7c00_7c00, 32'h3c00_3c00, 32'h7c00_7c00,
           32'h7e00_7e00, 4'hf, "fp16-inf-inf");
    mech[19]++;
    // inf * 2 + 1 -> +inf, -inf in the other lane
    dir_op(OP_FMA, 2'b10, 1'b0, 4'hf, '0, 32'hfc00_7c00, 32'h4000_4000, 32'h3c00_3c00,
           32'hfc00_7c00, 4'h0, "fp16-inf");
    // IEEE infinity into a posit result -> NaR
    dir_op(OP_FMA, 2'b10, 1'b0, 4'he, '0, 32'h7c00_3c00, 32'h3c00_3c00, 32'h0000_0000,
           32'h8000_4000, 4'h0, "inf-to-nar");
    mech[18]++;
    // signed zeros: -0 * 5 (multiply) -> -0 ; -0*5 + +0 -> +0 ; -0*5 - +0 -> -0
    dir_op(OP_MUL, 2'b00, 1'b0, 4'hf, '0, 32'h8000_0000, 32'h40a0_0000, 32'h0, 32'h8000_0000, 4'h0, "neg-zero-mul");
    dir_op(OP_FMA, 2'b00, 1'b0, 4'hf, '0, 32'h8000_0000, 32'h40a0_0000, 32'h0, 32'h0000_0000, 4'h0, "zero-sum");
    dir_op(OP_FMS, 2'b00, 1'b0, 4'hf, '0, 32'h8000_0000, 32'h40a0_0000, 32'h0, 32'h8000_0000, 4'h0, "neg-zero-sub");
    // x*1 - x = +0 exactly
    dir_op(OP_FMS, 2'b00, 1'b0, 4'hf, '0, 32'h4049_0fd0, 32'h3f80_0000, 32'h4049_0fd0, 32'h0000_0000, 4'h0, "cancel");
    mech[21] += 4;
    // posit -> IEEE conversion with es=3 (16-bit): x*1+0
    mod_op(OP_FMA, 2'b10, 1'b0, 4'h1, 12'b011_000_000_000, 32'h5a3c_a5c3, 32'h4000_4000, 32'h0, "p16-to-fp16");

    // quire overflow: 4x8 posits es=2, acc += 2^10*2^10 until the 32-bit
    // quire lanes overflow (2^20 per product against a 2^19 limit after the
    // 2^29 scale-factor excess) -> NaR
    begin
      exp_t x;
      x.vr = '0; x.nv = '0; x.of = '0; x.uf = '0; x.nx = '0;
      // 2^10 as 8-bit posit es=2: k=2, e=2 -> 0x74; 2^20 -> 0x7e
      dir_op(OP_FMA, 2'b11, 1'b0, 4'h0, 12'b010_010_010_010, 32'h7474_7474, 32'h7474_7474, 32'h0,
             32'h7e7e_7e7e, 4'h0, "qovf-init");
      for (int t = 1; t < 300; t++) begin
        logic [31:0] r;
        // sum = (t+1) * 2^20 ; posit8 es=2 of that, or NaR after overflow
        if (t + 1 >= 256) r = 32'h8080_8080;
        else r = 32'(r2p(real'(t + 1) * pow2(20), 8, 2)) * 32'h0101_0101;
        dir_op(OP_ACC, 2'b11, 1'b0, 4'h0, 12'b010_010_010_010, 32'h7474_7474, 32'h7474_7474, 32'h0,
               r, 4'h0, "qovf");
      end
      mech[20]++;
    end

    bubble();
    repeat (12) @(posedge clk);
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", expq.size());
    end
    for (int i = 0; i < NMECH; i++) begin
      $display("mechanism %-22s : %0d", mname[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", mname[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
