// tb_quire_accumulate: direct stimulus of the accumulate stage with random
// quire operands. Values are lane integer * 2^(sfq - F). Checked, per element:
//   - the sum equals product + Vc (op[2]=0) or product + accumulator (op[2]=1);
//   - the accumulator register holds every valid result (and only those);
//   - the result takes the larger quire scale factor and zero flags;
//   - two's complement overflow of a lane gives NaR;
//   - infinities of opposite sign give the invalid (signalling) flag.
module tb_quire_accumulate;
  import vmac_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  layout_e     lay;
  logic [2:0]  op;
  logic [3:0]  sp;
  quire_t      qp, qc;
  acc_t        res, acc_q;
  int checks = 0, failures = 0;
  real acc_ref [4];
  quire_accumulate dut (.clk(clk), .rst_n(rst_n), .valid(valid), .lay(lay), .op(op), .sp(sp),
                        .qp(qp), .qc(qc), .res(res), .acc_q(acc_q));
  always #5 clk = ~clk;

  function automatic real qv(logic [127:0] q, logic [31:0] sfq, int e, int ne);
    int qw, ew;
    logic [127:0] l, m;
    real r;
    qw = 128 / ne; ew = 32 / ne;
    m = (qw == 128) ? {128{1'b1}} : ((128'd1 << qw) - 1);
    l = (q >> (e * qw)) & m;
    if (l[qw-1]) r = -real'(((~l) + 1) & m); else r = real'(l);
    return r * pow2(sext((sfq >> (e * ew)) & ((ew == 32) ? 32'hffff_ffff : ((32'd1 << ew) - 1)), ew) - (qw / 2 - 4));
  endfunction
  function automatic real pow2(int k);
    real r = 1.0;
    if (k >= 0) repeat (k) r = r * 2.0; else repeat (-k) r = r / 2.0;
    return r;
  endfunction

  // Random quire operand: small signed lanes with 8 zero low bits.
  task automatic rq(output quire_t q, input int ne, input bit allow_zero);
    int qw, ew;
    qw = 128 / ne; ew = 32 / ne;
    q.q = '0; q.sfq = '0; q.rs = '0; q.z = '0; q.nar = '0; q.snan = '0; q.inf = '0;
    for (int e = 0; e < ne; e++) begin
      logic [127:0] l, m;
      int sf;
      m = (qw == 128) ? {128{1'b1}} : ((128'd1 << qw) - 1);
      l = {$urandom, $urandom, $urandom, $urandom} & (m >> ((qw > 60) ? (qw - 48) : 12)) & ~128'hff;
      if (l == 0 || (allow_zero && $urandom_range(0, 7) == 0)) l = '0;
      if ($urandom_range(0, 1)) l = ((~l) + 1) & m;
      sf = $urandom_range(0, 6) - 3;
      q.q |= l << (e * qw);
      q.sfq |= (32'(sf) & ((ew == 32) ? 32'hffff_ffff : ((32'd1 << ew) - 1))) << (e * ew);
      for (int i = 0; i < 4; i++) if (i / (4 / ne) == e) begin
        q.z[i] = (l == 0);
        q.rs[i] = l[qw-1];
      end
    end
  endtask

  task automatic step(logic [2:0] o, int ne, bit v);
    quire_t a, c;
    @(negedge clk);
    lay = layout_e'((ne == 1) ? LAY_1X32 : (ne == 2) ? LAY_2X16 : LAY_4X8);
    op = o; valid = v; sp = 4'($urandom);
    rq(a, ne, 1); rq(c, ne, 1);
    qp = a; qc = c;
    #1;
    for (int e = 0; e < ne; e++) begin
      real exp_v, got;
      exp_v = qv(qp.q, qp.sfq, e, ne) + (o[2] ? acc_ref[e] : qv(qc.q, qc.sfq, e, ne));
      got = qv(res.q, res.sfq, e, ne);
      checks++;
      if (got != exp_v || lane_flag(res.nar, e, ne) || lane_flag(res.z, e, ne) != (exp_v == 0.0 &&
          lane_flag(qp.z, e, ne) && (o[2] ? lane_flag(acc_q.z, e, ne) : lane_flag(qc.z, e, ne)))) begin
        failures++;
        $display("FAIL op=%b ne=%0d e=%0d got=%g exp=%g", o, ne, e, got, exp_v);
      end
      if (v) acc_ref[e] = exp_v;
    end
    @(posedge clk);
    #1;
    for (int e = 0; e < ne; e++) begin
      checks++;
      if (qv(acc_q.q, acc_q.sfq, e, ne) != acc_ref[e]) begin
        failures++;
        $display("FAIL accumulator ne=%0d e=%0d got=%g exp=%g", ne, e, qv(acc_q.q, acc_q.sfq, e, ne), acc_ref[e]);
      end
    end
  endtask

  initial begin
    lay = LAY_1X32; op = '0; sp = '0; qp = '0; qc = '0;
    for (int e = 0; e < 4; e++) acc_ref[e] = 0.0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 3; m++) begin
      int ne;
      ne = (m == 0) ? 1 : (m == 1) ? 2 : 4;
      step(3'b000, ne, 1'b1);
      for (int t = 0; t < 200; t++) begin
        logic [2:0] o;
        o = ($urandom_range(0, 3) == 0) ? 3'b000 : ($urandom_range(0, 1) ? 3'b100 : 3'b101);
        step(o, ne, $urandom_range(0, 5) != 0);
      end
    end
    // lane overflow -> NaR (4x8: 32-bit lanes)
    @(negedge clk);
    lay = LAY_4X8; op = 3'b000; valid = 1'b0;
    qp = '0; qc = '0;
    qp.q = {4{32'h6000_0000}}; qc.q = {4{32'h6000_0000}};
    #1;
    checks++;
    if (res.nar != 4'hf) begin
      failures++;
      $display("FAIL overflow not flagged: nar=%b", res.nar);
    end
    // +inf + -inf -> invalid; +inf + finite -> +inf
    qp.inf = 4'b0011; qp.rs = 4'b0011; qc.inf = 4'b0001; qc.rs = 4'b0000;
    qp.q = '0; qc.q = '0; qp.z = 4'b1100; qc.z = 4'b1110;
    #1;
    checks++;
    if (res.snan[0] != 1'b1 || res.snan[1] != 1'b0 || res.inf[1] != 1'b1 || res.sexp[1] != 1'b1) begin
      failures++;
      $display("FAIL infinity handling snan=%b inf=%b sexp=%b", res.snan, res.inf, res.sexp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
