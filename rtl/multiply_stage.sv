// multiply_stage: vector product of the decoded Va and Vb fields.
//
// Signs are XORed, scale factors added with a 32-bit vec_adder and the
// fraction vectors multiplied with the vectorized Booth multiplier. Each
// fraction lane is 1.f with the hidden bit at lane bit ew-3, so each product
// lane is a Q2.x number in [1,4) (or smaller for IEEE subnormals). The
// correction block brings it to Q1.(x+1): if the product's top bit (ovf) is 1
// the scale factor is incremented through the adder carry-in, otherwise the
// product lane is shifted left by one. Result: product lane of 64/NE bits with
// the binary point below bit 64/NE-5.
// Special values (posit and IEEE share the flags, priority sNaN > NaR/qNaN >
// inf > zero is applied at encode): NaR = NaR_a | NaR_b; sNaN (invalid) =
// sNaN_a | sNaN_b | 0*inf | inf*0; inf = (inf_a | inf_b) unless a NaN is
// produced; zero = z_a | z_b. Purely combinational.
//
// Follows the published architecture: sign XOR, scale-factor add with the
// correction carry, Booth product, IEEE priority of special values.
module multiply_stage
  import vmac_pkg::*;
(
  input  layout_e     lay,
  input  fields_t     a,
  input  fields_t     b,
  output prod_t       p
);
  logic [63:0] raw;
  logic [3:0]  ovf_cin;
  logic [31:0] sf_sum;
  logic [3:0]  sf_cout;

  vec_mult u_mult (.mode(lay), .a(a.f), .b(b.f), .p(raw));

  vec_adder #(.W(32)) u_sfadd (
    .mode(lay), .a(a.sf), .b(b.sf), .cin(ovf_cin), .sum(sf_sum), .cout(sf_cout)
  );

  always_comb begin
    logic signed [31:0] ne, pw;
    ne = nelem(lay);
    pw = 64 / ne;
    ovf_cin = '0;
    for (int e = 0; e < 4; e++) begin
      if (e < ne) ovf_cin[e * (4 / ne)] = raw[e * pw + pw - 5];
    end
  end

  always_comb begin
    logic signed [31:0] ne, pw;
    ne = nelem(lay);
    pw = 64 / ne;
    p.m = '0;
    for (int e = 0; e < 4; e++) begin
      begin
        logic [63:0] lane, mk;
        logic        ovf;
        mk   = (pw >= 64) ? {64{1'b1}} : ((64'd1 << pw) - 64'd1);
        lane = get64(raw, e, pw);
        ovf  = lane[pw-5];
        if (!ovf) lane = (lane << 1) & mk;
        if (e < ne) p.m |= put64(lane, e, pw);
      end
    end
    p.sf   = sf_sum;
    p.s    = a.s ^ b.s;
    p.nar  = a.nar | b.nar;
    p.snan = a.snan | b.snan | (a.inf & b.z) | (a.z & b.inf);
    p.inf  = (a.inf | b.inf) & ~p.nar & ~p.snan;
    p.z    = a.z | b.z;
  end
endmodule
