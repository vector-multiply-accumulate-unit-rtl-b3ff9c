// quire_accumulate: operand selection, alignment and addition of quires, and
// the accumulator register.
//
// The second operand is Vc's quire (op[2] = 0) or the accumulator register
// (op[2] = 1, accumulation). Per element, the swap logic picks the operand
// with the smaller quire scale factor (a zero operand is never the larger one,
// so a zero never forces the other operand to shift); that operand is
// arithmetically right-shifted by the scale-factor difference in a 128-bit
// vec_rshift whose discarded bits form a sticky bit, and added to the other.
// The result scale factor is the larger one. Two's complement overflow of the
// sum (operands of equal sign, sum of the other sign) raises NaR.
// Special values: NaR = NaR_p | NaR_s | overflow; sNaN (invalid) = sNaN_p |
// sNaN_s | (inf_p & inf_s & (rs_p ^ rs_s)); inf = inf_p | inf_s; zero flag =
// z_p & z_s. The sign for zero and infinity results (sexp) is the infinity's
// real sign, else the product sign for a plain multiplication, else rs_p & rs_s
// (so x + (-x) gives +0, as IEEE round-to-nearest requires).
// Timing: combinational from inputs to res; when valid is high the result is
// also written into the accumulator register at the clock edge, so an
// accumulation issued in the next cycle already sees it (no stall).
// The register resets to a +0 quire with scale factor 0.
//
// Follows the published architecture: operand selection, swap, alignment,
// addition and special-value logic. Own choices: accumulator reset and loading.
module quire_accumulate
  import vmac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  layout_e     lay,
  input  logic [2:0]  op,
  input  logic [3:0]  sp,     // product sign (before the operation's negation)
  input  quire_t      qp,
  input  quire_t      qc,
  output acc_t        res,
  output acc_t        acc_q
);
  localparam int unsigned CW = $clog2(QUIRE_W) + 1;

  logic [127:0]        shin, shout;
  logic [3:0][CW-1:0]  sha;
  logic [3:0]          stk;

  quire_t  qs;
  logic    use_acc;

  vec_rshift #(.W(QUIRE_W)) u_align (
    .mode(lay), .x(shin), .sh(sha), .y(shout), .sticky(stk)
  );

  always_comb begin
    use_acc = op[2];
    if (use_acc) begin
      qs.q = acc_q.q; qs.sfq = acc_q.sfq; qs.rs = acc_q.sexp;
      qs.z = acc_q.z; qs.nar = acc_q.nar; qs.snan = acc_q.snan; qs.inf = acc_q.inf;
    end else begin
      qs = qc;
    end
  end

  // swap[e] = 1: the product element is the one that is shifted
  logic [3:0] swap;
  logic [127:0] fixed;

  always_comb begin
    logic signed [31:0] ne, ew, qw;
    ne = nelem(lay);
    ew = 32 / ne;
    qw = 128 / ne;
    shin = '0; fixed = '0; sha = '0; swap = '0;
    for (int e = 0; e < 4; e++) begin
      begin
        logic [127:0] lp, ls;
        logic         zp, zs;
        logic signed [31:0] sfp, sfs, d;
        lp  = get128(qp.q, e, qw);
        ls  = get128(qs.q, e, qw);
        zp  = (lp == '0);
        zs  = (ls == '0);
        sfp = sext(get32(qp.sfq, e, ew), ew);
        sfs = sext(get32(qs.sfq, e, ew), ew);
        if (zs)      swap[e] = 1'b0;
        else if (zp) swap[e] = 1'b1;
        else         swap[e] = (sfp < sfs);
        d = swap[e] ? (sfs - sfp) : (sfp - sfs);
        if (zp || zs) d = 0;
        if (d > qw) d = qw;
        sha[e] = CW'(d);
        if (e < ne) shin  |= put128(swap[e] ? lp : ls, e, qw);
        if (e < ne) fixed |= put128(swap[e] ? ls : lp, e, qw);
      end
    end
  end

  always_comb begin
    logic signed [31:0] ne, ew, qw;
    ne = nelem(lay);
    ew = 32 / ne;
    qw = 128 / ne;
    res = '0;
    for (int e = 0; e < 4; e++) begin
      begin
        logic [127:0] a, b, sum, mq;
        logic         ov, zp, zs, ip, is_, rp, rs_, nr, sn, inf, sx;
        logic [31:0]  sfr;
        mq  = mask128(qw);
        a   = get128(fixed, e, qw);
        b   = get128(shout, e, qw);
        sum = (a + b) & mq;
        ov  = (a[qw-1] == b[qw-1]) && (sum[qw-1] != a[qw-1]);
        sfr = get32(swap[e] ? qs.sfq : qp.sfq, e, ew);
        zp  = lane_flag(qp.z, e, ne);
        zs  = lane_flag(qs.z, e, ne);
        ip  = lane_flag(qp.inf, e, ne);
        is_ = lane_flag(qs.inf, e, ne);
        rp  = lane_flag(qp.rs, e, ne);
        rs_ = lane_flag(qs.rs, e, ne);
        nr  = lane_flag(qp.nar, e, ne) | lane_flag(qs.nar, e, ne) | ov;
        sn  = lane_flag(qp.snan, e, ne) | lane_flag(qs.snan, e, ne) | (ip & is_ & (rp ^ rs_));
        inf = ip | is_;
        if (ip)               sx = rp;
        else if (is_)         sx = rs_;
        else if (op == OP_MUL) sx = lane_flag(sp, e, ne);
        else                  sx = rp & rs_;
        if (e < ne) res.q      |= put128(sum, e, qw);
        if (e < ne) res.sfq    |= put32(sfr, e, ew);
        if (e < ne) res.sticky |= flag_rep(stk[e] | (use_acc & lane_flag(acc_q.sticky, e, ne)), e, ne);
        if (e < ne) res.sexp   |= flag_rep(sx, e, ne);
        if (e < ne) res.z      |= flag_rep(zp & zs, e, ne);
        if (e < ne) res.nar    |= flag_rep(nr, e, ne);
        if (e < ne) res.snan   |= flag_rep(sn, e, ne);
        if (e < ne) res.inf    |= flag_rep(inf, e, ne);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= '0;
      acc_q.z <= 4'hf;
    end else if (valid) begin
      acc_q <= res;
    end
  end
endmodule
