// tb_posit_encode: random normalised elements are encoded to posits of every
// precision and exponent size and compared with the reference rounding
// (round to nearest even on the exact value, saturation to maxpos / minpos,
// never rounding to zero or NaR). Zero and NaR requests are checked too.
module tb_posit_encode;
  import vmac_pkg::*;
  import vmac_ref_pkg::*;
  logic [1:0]  pre;
  logic        vec;
  logic [2:0]  es;
  norm_t       r;
  logic [3:0]  nar;
  logic [31:0] y;
  int checks = 0, failures = 0, nsat = 0;
  posit_encode dut (.pre(pre), .vec(vec), .es(es), .r(r), .nar(nar), .y(y));
`include "tb_enc_common.svh"
  initial begin
    for (int t = 0; t < 4000; t++) begin
      int ne, n, ev, lim;
      real v [4];
      pre = (t % 3 == 0) ? 2'b00 : (t % 3 == 1) ? 2'b10 : 2'b11;
      vec = ($urandom_range(0, 4) == 0);
      es  = 3'($urandom_range(0, 4));
      ne = nelem(layout_of(pre, vec)); n = nbits_of(pre); ev = es_eff(es, n);
      lim = (n - 2) * (1 << ev) + 4;
      if (lim > 120) lim = 120;
      r = '0; nar = '0;
      for (int e = 0; e < ne; e++) rand_norm(r, e, ne, -lim, lim, v[e]);
      if (t % 10 == 0) r.z = 4'b0001;
      if (t % 10 == 1) nar = 4'b1000;
      #1;
      for (int e = 0; e < ne; e++) begin
        longint unsigned exp_b;
        logic [31:0] ye;
        if (lane_flag(nar, e, ne)) exp_b = 64'd1 << (n - 1);
        else if (lane_flag(r.z, e, ne)) exp_b = 0;
        else exp_b = r2p(v[e], n, ev);
        if (!lane_flag(nar, e, ne) && !lane_flag(r.z, e, ne) &&
            (rabs(v[e]) > p2r((64'd1 << (n - 1)) - 1, n, ev) || rabs(v[e]) < p2r(1, n, ev))) nsat++;
        ye = get32(y, e, n);
        checks++;
        if (64'(ye) != exp_b) begin
          failures++;
          $display("FAIL pre=%b vec=%b es=%0d e=%0d v=%g y=%h exp=%h", pre, vec, es, e, v[e], ye, exp_b);
        end
      end
    end
    checks++;
    if (nsat == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) #10;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
