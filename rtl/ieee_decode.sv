// ieee_decode: vector IEEE-754 decoder for FP32, FP16 and the 8-bit 1-4-3
// microfloat (bias 7).
//
// For every element the sign, exponent and significand are unpacked. The
// exponent is checked for all zeros (expZ) and all ones (expF) and the
// significand for all zeros (fracZ). sf = exp - bias + expZ, so subnormals get
// exp_min = 1 - bias; the hidden bit is not expZ. Flags: z = expZ & fracZ,
// inf = expF & fracZ, and NaNs are split by the significand MSB (1 = qNaN,
// reported on nar; 0 = sNaN). Output layout as in posit_decode: fraction lane =
// 2 padding zeros, hidden bit, significand left-aligned with zeros after it.
// Purely combinational.
//
// Follows the published architecture: unbiased exponent, subnormals and special
// flags. Own choice: the 8-bit format is 1-4-3 with bias 7.
module ieee_decode
  import vmac_pkg::*;
(
  input  logic [1:0]  pre,
  input  logic        vec,
  input  logic [31:0] x,
  output logic [3:0]  s,
  output logic [31:0] sf,
  output logic [31:0] f,
  output logic [3:0]  z,
  output logic [3:0]  qnan,
  output logic [3:0]  snan,
  output logic [3:0]  inf
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
    s = '0; sf = '0; f = '0; z = '0; qnan = '0; snan = '0; inf = '0;
    for (int e = 0; e < 4; e++) begin
      begin
        logic [31:0] xe, ex, man;
        logic        exp_z, exp_f, frac_z, msb;
        logic signed [31:0] sfv;
        xe     = get32(x, e, n);
        ex     = (xe >> wm) & mask32(we);
        man    = xe & mask32(wm);
        exp_z  = (ex == 32'd0);
        exp_f  = (ex == mask32(we));
        frac_z = (man == 32'd0);
        msb    = man[wm-1];
        sfv    = int'(ex) - bias + int'(exp_z);
        if (e < ne) s    |= flag_rep(xe[n-1], e, ne);
        if (e < ne) z    |= flag_rep(exp_z & frac_z, e, ne);
        if (e < ne) inf  |= flag_rep(exp_f & frac_z, e, ne);
        if (e < ne) qnan |= flag_rep(exp_f & !frac_z & msb, e, ne);
        if (e < ne) snan |= flag_rep(exp_f & !frac_z & !msb, e, ne);
        if (e < ne) sf   |= put32(32'(sfv), e, ew);
        if (e < ne) f    |= put32((32'(!exp_z) << (ew - 3)) | (man << (ew - 3 - wm)), e, ew);
      end
    end
  end
endmodule
