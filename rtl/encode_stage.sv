// encode_stage: unified posit / IEEE-754 result encoder.
//
// The normalized result feeds both encoders in parallel and the result format
// bit selects the output vector. For a posit result every IEEE special value
// (sNaN, qNaN, infinity) becomes NaR; the IEEE status flags are only reported
// for IEEE results (0 otherwise). The result may use a format or exponent size
// different from the operands, which gives conversions for free.
// Purely combinational; the output register sits in the top level.
//
// Follows the published architecture: both encoders selected by the result
// format. Own choice: IEEE specials become NaR for a posit result.
module encode_stage
  import vmac_pkg::*;
(
  input  logic [1:0]  pre,
  input  logic        vec,
  input  logic        fmt,
  input  logic [2:0]  es,
  input  norm_t       r,
  output logic [31:0] y,
  output logic [3:0]  nv,
  output logic [3:0]  of,
  output logic [3:0]  uf,
  output logic [3:0]  nx
);
  logic [31:0] yp, yi;
  logic [3:0]  inv, iof, iuf, inx;

  posit_encode u_posit (
    .pre(pre), .vec(vec), .es(es), .r(r), .nar(r.nar | r.snan | r.inf), .y(yp)
  );

  ieee_encode u_ieee (
    .pre(pre), .vec(vec), .r(r), .y(yi), .nv(inv), .of(iof), .uf(iuf), .nx(inx)
  );

  always_comb begin
    if (fmt == FMT_IEEE) begin
      y = yi; nv = inv; of = iof; uf = iuf; nx = inx;
    end else begin
      y = yp; nv = '0; of = '0; uf = '0; nx = '0;
    end
  end
endmodule
