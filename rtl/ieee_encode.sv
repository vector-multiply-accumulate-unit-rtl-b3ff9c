// ieee_encode: vector IEEE-754 encoder (FP32, FP16, 8-bit 1-4-3 microfloat)
// with round to nearest even and the five-flag status subset produced here.
//
// Per element the biased exponent is sf + bias. Normal range (biased >= 1):
// the mantissa is the M bits after the leading bit, rounded with the guard bit
// and the sticky (remaining bits OR incoming sticky); a mantissa carry bumps
// the exponent, and an exponent reaching all ones overflows to infinity.
// Subnormal range (biased <= 0): the significand is right-shifted by
// 1 - biased (saturating, shifted-out bits go to sticky) and rounded; a carry
// into the hidden position turns it into the smallest normal.
// Priority of results: sNaN (invalid) -> canonical qNaN with NV; NaR/qNaN ->
// canonical qNaN; infinity -> signed infinity; zero -> signed zero.
// Flags: nv = sNaN; of = rounded exponent out of range (finite operands only);
// nx = any discarded bit or overflow; uf = tiny and inexact, where tininess is
// detected after rounding: biased < 0, or biased == 0 and rounding the
// mantissa with unbounded exponent does not carry out.
// Canonical qNaN: sign 0, exponent all ones, mantissa MSB 1.
// Output placement as in posit_encode. Purely combinational.
//
// Follows the published architecture: bias, RNE, subnormals, tininess after
// rounding. Own choices: canonical NaN pattern and per-element flags.
module ieee_encode
  import vmac_pkg::*;
(
  input  logic [1:0]  pre,
  input  logic        vec,
  input  norm_t       r,
  output logic [31:0] y,
  output logic [3:0]  nv,
  output logic [3:0]  of,
  output logic [3:0]  uf,
  output logic [3:0]  nx
);
  always_comb begin
    layout_e lay;
    logic signed [31:0] ne, ew, n, we, wm, bias;
    lay  = layout_of(pre, vec);
    ne   = nelem(lay);
    ew   = 32 / ne;
    n    = nbits_of(pre);
    we   = ieee_e(n);
    wm   = ieee_m(n);
    bias = ieee_bias(n);
    y = '0; nv = '0; of = '0; uf = '0; nx = '0;
    for (int e = 0; e < 4; e++) begin
      begin
        logic [31:0] fr, v, man, qnan, infv;
        logic [63:0] sh;
        logic        sg, g, rest, up, f_of, f_uf, f_nx, f_nv, tiny;
        logic signed [31:0] bsd, ef, s;
        logic [31:0] mn;
        logic        gn, rn;
        man = '0; g = 1'b0; rest = 1'b0; up = 1'b0; ef = 0; s = 0; sh = '0;
        mn = '0; gn = 1'b0; rn = 1'b0; tiny = 1'b0;
        sg   = lane_flag(r.s, e, ne);
        fr   = get32(r.f, e, ew) << (32 - ew);   // leading bit at 31
        bsd  = sext(get32(r.sf, e, ew), ew) + bias;
        qnan = (mask32(we) << wm) | (32'd1 << (wm - 1));
        infv = (32'(sg) << (n - 1)) | (mask32(we) << wm);
        f_of = 1'b0; f_uf = 1'b0; f_nx = 1'b0; f_nv = 1'b0;
        if (lane_flag(r.snan, e, ne)) begin
          v = qnan; f_nv = 1'b1;
        end else if (lane_flag(r.nar, e, ne)) begin
          v = qnan;
        end else if (lane_flag(r.inf, e, ne)) begin
          v = infv;
        end else if (lane_flag(r.z, e, ne)) begin
          v = 32'(sg) << (n - 1);
        end else if (bsd >= 1) begin
          man  = (fr << 1) >> (32 - wm);
          g    = fr[30 - wm];
          rest = ((fr << (wm + 2)) != '0) | lane_flag(r.sticky, e, ne);
          up   = g & (rest | man[0]);
          man  = man + 32'(up);
          ef   = bsd;
          if (man[wm]) begin
            man = '0;
            ef  = ef + 1;
          end
          f_nx = g | rest;
          if (ef >= (1 << we) - 1) begin
            v = infv; f_of = 1'b1; f_nx = 1'b1;
          end else begin
            v = (32'(sg) << (n - 1)) | (32'(ef) << wm) | man;
          end
        end else begin
          s    = 1 - bsd;
          sh   = (s >= 64) ? 64'd0 : ({fr, 32'd0} >> s);
          rest = ((s >= 64) ? (fr != '0) : (({fr, 32'd0} & ((64'd1 << s) - 64'd1)) != '0))
                 | lane_flag(r.sticky, e, ne);
          man  = 32'((sh << 1) >> (64 - wm));
          g    = sh[62 - wm];
          rest = rest | ((sh << (wm + 2)) != '0);
          up   = g & (rest | man[0]);
          f_nx = g | rest;
          // man + up may carry into the exponent field: smallest normal
          v    = (32'(sg) << (n - 1)) | (man + 32'(up));
          // tininess after rounding
          mn   = (fr << 1) >> (32 - wm);
          gn   = fr[30 - wm];
          rn   = ((fr << (wm + 2)) != '0) | lane_flag(r.sticky, e, ne);
          tiny = (bsd < 0) || !(gn && (rn || mn[0]) && (mn == mask32(wm)));
          f_uf = tiny & f_nx;
        end
        if (e < ne) y  |= put32(v, e, n);
        if (e < ne) nv |= flag_rep(f_nv, e, ne);
        if (e < ne) of |= flag_rep(f_of, e, ne);
        if (e < ne) uf |= flag_rep(f_uf, e, ne);
        if (e < ne) nx |= flag_rep(f_nx, e, ne);
      end
    end
  end
endmodule
