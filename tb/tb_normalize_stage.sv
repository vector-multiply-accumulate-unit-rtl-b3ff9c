// tb_normalize_stage: random quire elements (both signs, leading one at a
// random position, optional lost low bit) are normalised. The result element
// f * 2^(sf - (lane width - 1)) must equal the quire magnitude truncated to
// the lane width, with the sign, the zero flag and the sticky bit (set when
// any non-zero bit was dropped) matching.
module tb_normalize_stage;
  import vmac_pkg::*;
  layout_e lay;
  acc_t    a;
  norm_t   o;
  int checks = 0, failures = 0;
  normalize_stage dut (.lay(lay), .a(a), .o(o));

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int ne, ew, qw, fw;
      int          sfq_e [4];
      logic [31:0] top_e [4];
      int          sh_e  [4];
      bit          st_e  [4], neg_e [4], zr_e [4];
      lay = layout_e'(t % 3);
      ne = nelem(lay); ew = 32 / ne; qw = 128 / ne; fw = qw / 2 - 4;
      a = '0;
      for (int e = 0; e < ne; e++) begin
        logic [127:0] l, m;
        m = (qw == 128) ? {128{1'b1}} : ((128'd1 << qw) - 1);
        top_e[e] = $urandom | (32'd1 << (ew - 1));
        if (ew < 32) top_e[e] &= (32'd1 << ew) - 1;
        sh_e[e]  = $urandom_range(0, qw - ew - 9);
        st_e[e]  = (sh_e[e] > 0) && $urandom_range(0, 1);
        neg_e[e] = $urandom_range(0, 1);
        zr_e[e]  = ($urandom_range(0, 9) == 0);
        sfq_e[e] = $urandom_range(0, 8) - 4;
        l = (128'(top_e[e]) << sh_e[e]) | 128'(st_e[e]);
        if (zr_e[e]) l = '0;
        if (neg_e[e]) l = ((~l) + 1) & m;
        a.q   |= l << (e * qw);
        a.sfq |= (32'(sfq_e[e]) & ((ew == 32) ? 32'hffff_ffff : ((32'd1 << ew) - 1))) << (e * ew);
        a.z   |= flag_rep(zr_e[e], e, ne);
        a.sexp|= flag_rep(neg_e[e], e, ne);
      end
      #1;
      for (int e = 0; e < ne; e++) begin
        logic [31:0] fe;
        int sfe, esf;
        fe  = (o.f >> (e * ew)) & ((ew == 32) ? 32'hffff_ffff : ((32'd1 << ew) - 1));
        sfe = sext((o.sf >> (e * ew)) & ((ew == 32) ? 32'hffff_ffff : ((32'd1 << ew) - 1)), ew);
        esf = sfq_e[e] + sh_e[e] + ew - 1 - fw;
        checks++;
        if (zr_e[e]) begin
          if (!lane_flag(o.z, e, ne)) begin
            failures++;
            $display("FAIL zero not flagged lay=%0d e=%0d", lay, e);
          end
        end else if (lane_flag(o.z, e, ne) || fe != top_e[e] || sfe != esf ||
                     lane_flag(o.s, e, ne) != neg_e[e] ||
                     (!neg_e[e] && lane_flag(o.sticky, e, ne) != st_e[e])) begin
          failures++;
          $display("FAIL lay=%0d e=%0d f=%h exp %h sf=%0d exp %0d s=%b sticky=%b exp %b",
                   lay, e, fe, top_e[e], sfe, esf, o.s, o.sticky, st_e[e]);
        end
      end
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
