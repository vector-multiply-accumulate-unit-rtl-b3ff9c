// posit_encode: vector posit encoder with run-time exponent size.
//
// Per element: k = sf >> es (arithmetic) and e = sf mod 2^es. If k is beyond
// the largest regime of the precision the magnitude saturates to maxpos
// (k >= n-2) or minpos (k < -(n-2)); posits never overflow to NaR or underflow
// to zero. Otherwise the regime (k+1 ones and a zero for k >= 0, -k zeros and
// a one for k < 0), the es exponent bits and the fraction are laid out
// left-aligned; the top n-1 bits are the unrounded magnitude, the next bit is
// the guard bit and everything below it plus the incoming sticky bit is the
// sticky. Rounding is to nearest, ties to even. The magnitude is then two's
// complemented for negative results. Zero gives all zeros, NaR gives 1 followed
// by zeros (NaR wins). Output placement: element e of n bits in y[e*n +: n], a
// scalar (vec=1) in the low n bits. Purely combinational.
//
// Follows the published architecture in function: RNE with guard and sticky,
// saturation. Own choice: per-element bit-string build, not a shared shifter.
module posit_encode
  import vmac_pkg::*;
(
  input  logic [1:0]  pre,
  input  logic        vec,
  input  logic [2:0]  es,
  input  norm_t       r,
  input  logic [3:0]  nar,    // NaR request per element (NaR and IEEE specials)
  output logic [31:0] y
);
  function automatic logic [31:0] enc1(logic sg, int sfv, logic [31:0] fr,
                                       logic st, int n, int esv);
    logic signed [31:0] k, rl;
    logic [31:0] ex, p, mk;
    logic [127:0] bs, rg;
    logic        g, rest;
    mk = mask32(n - 1);
    k  = sfv >>> esv;
    ex = 32'(sfv) & mask32(esv);
    if (k >= n - 2) begin
      p = mk;
    end else if (k < -(n - 2)) begin
      p = 32'd1;
    end else begin
      if (k >= 0) begin
        rl = k + 2;
        rg = ((128'd1 << (k + 1)) - 128'd1) << 1;
      end else begin
        rl = 1 - k;
        rg = 128'd1;
      end
      bs = rg << (128 - rl);
      if (esv > 0) bs |= 128'(ex) << (128 - rl - esv);
      bs |= 128'(fr) << (128 - rl - esv - 32);
      p    = 32'(bs >> (128 - (n - 1)));
      g    = bs[128 - n];
      rest = ((bs << n) != '0) | st;
      if (g && (rest || p[0])) p = p + 32'd1;
    end
    return sg ? ((~p + 32'd1) & mask32(n)) : p;
  endfunction

  always_comb begin
    layout_e lay;
    logic signed [31:0] ne, ew, n, esv;
    lay = layout_of(pre, vec);
    ne  = nelem(lay);
    ew  = 32 / ne;
    n   = nbits_of(pre);
    esv = es_eff(es, n);
    y = '0;
    for (int e = 0; e < 4; e++) begin
      begin
        logic [31:0] v, fl;
        // fraction bits after the leading bit, left-aligned
        fl = get32(r.f, e, ew) << (33 - ew);
        if (lane_flag(nar, e, ne))       v = 32'd1 << (n - 1);
        else if (lane_flag(r.z, e, ne))  v = '0;
        else v = enc1(lane_flag(r.s, e, ne), sext(get32(r.sf, e, ew), ew), fl,
                      lane_flag(r.sticky, e, ne), n, esv);
        if (e < ne) y |= put32(v, e, n);
      end
    end
  end
endmodule
