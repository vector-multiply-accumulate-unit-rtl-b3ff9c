// Shared stimulus for the encoder testbenches: a random normalised element
// (sign, scale factor, lane-width fraction with its leading one at the lane
// MSB, sticky bit) and its exact value; the sticky bit is modelled by a tiny
// extra magnitude far below the fraction's last bit.
task automatic rand_norm(inout norm_t r, input int e, input int ne, input int sflo, input int sfhi,
                         output real v);
  int ew, sfv;
  logic [31:0] fr;
  bit sg, st;
  ew  = 32 / ne;
  fr  = $urandom;
  if ($urandom_range(0, 3) == 0) fr = fr & 32'hff00_0000;
  fr  = (fr >> (32 - ew)) | (32'd1 << (ew - 1));
  sfv = $urandom_range(0, sfhi - sflo) + sflo;
  sg  = $urandom_range(0, 1);
  st  = $urandom_range(0, 2) == 0;
  r.f      |= put32(fr, e, ew);
  r.sf     |= put32(32'(sfv), e, ew);
  r.s      |= flag_rep(sg, e, ne);
  r.sticky |= flag_rep(st, e, ne);
  v = (real'(fr) + (st ? 0.00390625 : 0.0)) * pow2(sfv - (ew - 1));
  if (sg) v = -v;
endtask
