// quire_scale: converts the product and Vc into the reduced quire format.
//
// Quire element layout (128/NE bits): 8 bits of sign and carry guard, then an
// integer and a fraction field of equal size F = 128/(2NE) - 4 bits (60/28/12
// bits for 1/2/4 elements). For each operand and element:
//  1. real sign rs = s XOR (op[0] AND op[2]) for the product (only an
//     accumulation may subtract the product) and s XOR op[0] for Vc;
//  2. the mantissa is placed with its leading bit on the quire's units bit and
//     two's complemented when rs AND NOT zero (a zero is never negated);
//  3. saturation of the scale factor sf against max_int = F-1:
//       sf < 0          -> no shift,        sfq = sf
//       0 <= sf <= max  -> shift left by sf, sfq = 0
//       sf > max        -> shift by max,     sfq = sf - max
//     the shift is done by a 128-bit vec_lshift.
// The quire value of an element is q * 2^(sfq - F). Purely combinational.
//
// Follows the published architecture: saturating shift into the reduced quire
// with a quire scale factor. Own choice: max_int = integer bits - 1.
module quire_scale
  import vmac_pkg::*;
(
  input  layout_e     lay,
  input  logic [2:0]  op,
  input  prod_t       p,
  input  fields_t     c,
  output quire_t      qp,
  output quire_t      qc
);
  localparam int unsigned CW = $clog2(QUIRE_W) + 1;

  logic [127:0]         tp, tc, yp, yc;
  logic [3:0][CW-1:0]   shp, shc;
  logic [31:0]          sfqp, sfqc;
  logic [3:0]           rsp, rsc;

  vec_lshift #(.W(QUIRE_W)) u_shp (.mode(lay), .x(tp), .sh(shp), .y(yp));
  vec_lshift #(.W(QUIRE_W)) u_shc (.mode(lay), .x(tc), .sh(shc), .y(yc));

  // Saturation logic: returns {shift, sfq}.
  function automatic void satq(input int sfv, input int maxint,
                               output int sh, output int sfq);
    if (sfv < 0) begin
      sh = 0; sfq = sfv;
    end else if (sfv > maxint) begin
      sh = maxint; sfq = sfv - maxint;
    end else begin
      sh = sfv; sfq = 0;
    end
  endfunction

  always_comb begin
    logic signed [31:0] ne, ew, pw, qw, fw, maxint;
    ne = nelem(lay);
    ew = 32 / ne;
    pw = 64 / ne;
    qw = 128 / ne;
    fw = qw / 2 - 4;
    maxint = fw - 1;
    rsp = p.s ^ {4{op[0] & op[2]}};
    rsc = c.s ^ {4{op[0]}};
    tp = '0; tc = '0; shp = '0; shc = '0; sfqp = '0; sfqc = '0;
    for (int e = 0; e < 4; e++) begin
      begin
        logic [127:0] mq, vp, vc;
        logic [63:0]  pl;
        logic [31:0]  cl;
        logic signed [31:0] sh, sfq;
        mq = mask128(qw);
        pl = get64(p.m, e, pw);
        cl = get32(c.f, e, ew);
        // product: binary point below bit pw-5 -> move it below bit fw
        vp = 128'(pl) << (fw - (pw - 5));
        // Vc: binary point below bit ew-3
        vc = 128'(cl) << (fw - (ew - 3));
        if (lane_flag(rsp, e, ne) && !lane_flag(p.z, e, ne)) vp = (~vp + 128'd1) & mq;
        if (lane_flag(rsc, e, ne) && !lane_flag(c.z, e, ne)) vc = (~vc + 128'd1) & mq;
        if (e < ne) tp |= put128(vp, e, qw);
        if (e < ne) tc |= put128(vc, e, qw);
        satq(sext(get32(p.sf, e, ew), ew), maxint, sh, sfq);
        shp[e] = CW'(sh);
        if (e < ne) sfqp |= put32(32'(sfq), e, ew);
        satq(sext(get32(c.sf, e, ew), ew), maxint, sh, sfq);
        shc[e] = CW'(sh);
        if (e < ne) sfqc |= put32(32'(sfq), e, ew);
      end
    end
  end

  always_comb begin
    qp.q = yp; qp.sfq = sfqp; qp.rs = rsp;
    qp.z = p.z; qp.nar = p.nar; qp.snan = p.snan; qp.inf = p.inf;
    qc.q = yc; qc.sfq = sfqc; qc.rs = rsc;
    qc.z = c.z; qc.nar = c.nar; qc.snan = c.snan; qc.inf = c.inf;
  end
endmodule
