// posit_decode: vector posit decoder with run-time exponent size.
//
// Input x holds one 32-bit, two 16-bit or four 8-bit posits (precision from
// pre), or a single 8/16-bit scalar in its low bits when vec=1. For every
// element the decoder takes the sign, two's complements negative values,
// inverts the body when the regime starts with a 1, counts the regime run with
// a leading-zero count, derives k (m-1 for a run of ones, -m for a run of
// zeros), shifts the regime out, splits the exponent (es bits, missing bits
// read as 0) from the fraction, and forms sf = k*2^es + e.
// Outputs follow the decoded-fields format: one sign/zero/NaR bit per
// element replicated over its 4/NE flag bits; sf sign-extended in a 32/NE-bit
// lane; fraction lane = 2 zero padding bits, hidden bit (= not zero), fraction
// bits left-aligned. Unused lanes are 0. Exponent sizes are limited to 3 for
// 8-bit posits (two es bits) and 7 otherwise. Purely combinational.
//
// Follows the published architecture in function: regime, exponent and
// fraction split with a run-time es. Own choice: a priority loop for the run.
module posit_decode
  import vmac_pkg::*;
(
  input  logic [1:0]  pre,
  input  logic        vec,
  input  logic [2:0]  es,
  input  logic [31:0] x,
  output logic [3:0]  s,
  output logic [31:0] sf,
  output logic [31:0] f,
  output logic [3:0]  z,
  output logic [3:0]  nar
);
  always_comb begin
    layout_e lay;
    logic signed [31:0] ne, ew, n, esv;
    lay = layout_of(pre, vec);
    ne  = nelem(lay);
    ew  = 32 / ne;
    n   = nbits_of(pre);
    esv = es_eff(es, n);
    s = '0; sf = '0; f = '0; z = '0; nar = '0;
    for (int e = 0; e < 4; e++) begin
      begin
        logic [31:0] xe, y, t, inv;
        logic [63:0] t2;
        logic        sg, ze, ne_r, r0, hit;
        logic signed [31:0] m, k, ex, sfv;
        xe   = get32(x, e, n);
        sg   = xe[n-1];
        ze   = (xe == 32'd0);
        ne_r = (xe == (32'd1 << (n - 1)));
        y    = sg ? ((~xe + 32'd1) & mask32(n)) : xe;
        // body after the sign, left-aligned at bit 31
        t    = y << (33 - n);
        r0   = t[31];
        inv  = (r0 ? ~t : t) | mask32(33 - n);
        m    = 0;
        hit  = 1'b0;
        for (int i = 31; i >= 0; i--) begin
          hit = hit | inv[i];
          if (!hit) m++;
        end
        k    = r0 ? (m - 1) : -m;
        t2   = {t, 32'd0} << (m + 1);
        ex   = (esv == 0) ? 0 : int'(t2[63:32] >> (32 - esv));
        t2   = t2 << esv;
        sfv  = k * (1 << esv) + ex;
        if (e < ne) s   |= flag_rep(sg, e, ne);
        if (e < ne) z   |= flag_rep(ze, e, ne);
        if (e < ne) nar |= flag_rep(ne_r, e, ne);
        if (e < ne) sf  |= put32(32'(sfv), e, ew);
        if (e < ne) f   |= put32((32'(!ze) << (ew - 3)) | (t2[63:32] >> (35 - ew)), e, ew);
      end
    end
  end
endmodule
