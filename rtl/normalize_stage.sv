// normalize_stage: converts each quire element back to sign, scale factor and
// normalized fraction.
//
// Per element (128/NE-bit quire lane, F fraction bits): the sign is the lane
// MSB and the lane is two's complemented to a magnitude. A 128-bit vec_lzc
// counts its leading zeros zc and a 128-bit vec_lshift moves the leading one
// to the lane MSB. The scale factor becomes sfq + (offset - zc) with
// offset = 128/NE - 1 - F, saturated to the 32/NE-bit scale-factor lane. The
// top 32/NE bits of the shifted lane form the fraction lane (leading bit at the
// lane MSB); all lower bits are ORed with the incoming sticky bit.
// A zero magnitude sets the zero flag (a sum that cancels to zero still has a
// scale factor). For zero and infinity results the sign is the special-value
// sign computed in the accumulate stage. Purely combinational.
//
// Follows the published architecture: two's complement magnitude, vector LZC and
// left shift. Own choice: the scale factor saturates to the lane width.
module normalize_stage
  import vmac_pkg::*;
(
  input  layout_e     lay,
  input  acc_t        a,
  output norm_t       o
);
  localparam int unsigned CW = $clog2(QUIRE_W) + 1;

  logic [127:0]        mag, nrm;
  logic [3:0][CW-1:0]  zc;
  logic [3:0]          allz;

  vec_lzc    #(.W(QUIRE_W)) u_lzc (.mode(lay), .x(mag), .cnt(zc), .allz(allz));
  vec_lshift #(.W(QUIRE_W)) u_shl (.mode(lay), .x(mag), .sh(zc), .y(nrm));

  always_comb begin
    logic signed [31:0] ne, ew, qw, fw;
    ne = nelem(lay);
    ew = 32 / ne;
    qw = 128 / ne;
    fw = qw / 2 - 4;
    mag = '0;
    for (int e = 0; e < 4; e++) begin
      begin
        logic [127:0] l;
        l = get128(a.q, e, qw);
        if (l[qw-1]) l = (~l + 128'd1) & mask128(qw);
        if (e < ne) mag |= put128(l, e, qw);
      end
    end
  end

  always_comb begin
    logic signed [31:0] ne, ew, qw, fw;
    ne = nelem(lay);
    ew = 32 / ne;
    qw = 128 / ne;
    fw = qw / 2 - 4;
    o = '0;
    o.nar  = a.nar;
    o.snan = a.snan;
    o.inf  = a.inf;
    for (int e = 0; e < 4; e++) begin
      begin
        logic [127:0] l, low;
        logic         sg, zr, sp, fi, fs;
        logic signed [31:0] sfv;
        l   = get128(nrm, e, qw);
        sg  = get128(a.q, e, qw) >> (qw - 1) != 0;
        zr  = allz[e] | lane_flag(a.z, e, ne);
        sfv = sext(get32(a.sfq, e, ew), ew) + (qw - 1 - fw) - int'(zc[e]);
        low = l & mask128(qw - ew);
        fi  = lane_flag(a.inf, e, ne);
        fs  = lane_flag(a.sexp, e, ne);
        sp  = (zr || fi) ? fs : sg;
        if (e < ne) o.s      |= flag_rep(sp, e, ne);
        if (e < ne) o.z      |= flag_rep(zr, e, ne);
        if (e < ne) o.sticky |= flag_rep((low != '0) | lane_flag(a.sticky, e, ne), e, ne);
        if (e < ne) o.sf     |= put32(32'(sat(sfv, ew)), e, ew);
        if (e < ne) o.f      |= put32(32'(l >> (qw - ew)), e, ew);
      end
    end
  end
endmodule
