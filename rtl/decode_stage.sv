// decode_stage: unified posit / IEEE-754 decoder for one operand vector.
//
// Both format decoders see the operand; the operand's format bit selects
// which one drives the decoded-fields vector. IEEE qNaN is merged into the NaR
// flag (NaR converts to qNaN); sNaN and infinity flags are only non-zero for
// IEEE operands. Each operand (and the result) has its own format and exponent
// size, which is what allows cross-format operations and conversions.
// Purely combinational; the pipeline register sits in the top level.
//
// Follows the published architecture: both decoders, selected by format, with
// qNaN merged into NaR. Own choice: fmt = 1 means IEEE-754.
module decode_stage
  import vmac_pkg::*;
(
  input  logic [1:0]  pre,
  input  logic        vec,
  input  logic        fmt,   // 0 = posit, 1 = IEEE-754
  input  logic [2:0]  es,
  input  logic [31:0] x,
  output fields_t     d
);
  logic [3:0]  ps, pz, pnar, is, iz, iq, isn, iinf;
  logic [31:0] psf, pf, isf, ifr;

  posit_decode u_posit (
    .pre(pre), .vec(vec), .es(es), .x(x),
    .s(ps), .sf(psf), .f(pf), .z(pz), .nar(pnar)
  );

  ieee_decode u_ieee (
    .pre(pre), .vec(vec), .x(x),
    .s(is), .sf(isf), .f(ifr), .z(iz), .qnan(iq), .snan(isn), .inf(iinf)
  );

  always_comb begin
    if (fmt == FMT_IEEE) begin
      d.s = is; d.sf = isf; d.f = ifr; d.z = iz;
      d.nar = iq; d.snan = isn; d.inf = iinf;
    end else begin
      d.s = ps; d.sf = psf; d.f = pf; d.z = pz;
      d.nar = pnar; d.snan = '0; d.inf = '0;
    end
  end
endmodule
