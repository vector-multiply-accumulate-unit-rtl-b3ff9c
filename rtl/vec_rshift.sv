// vec_rshift: vectorized arithmetic right barrel shifter with sticky bits.
//
// Every element (1, 2 or 4 elements of W/NE bits) is shifted right by its own
// amount sh[e], copies of the element's sign bit enter at the MSB (the quire is
// two's complement), and the bits shifted out below the LSB are ORed into
// sticky[e]. sh[e] >= the element width leaves only sign bits and folds the
// whole element into the sticky bit. Built as log2(W) multiplexer levels per
// element. sticky[e] for unused elements is 0. Purely combinational.
//
// Follows the published architecture in function: arithmetic shift and sticky
// bit per element. Own choice: per-element multiplexer levels.
module vec_rshift
  import vmac_pkg::*;
#(
  parameter int unsigned W = 128,
  localparam int unsigned CW = $clog2(W) + 1
) (
  input  layout_e             mode,
  input  logic [W-1:0]        x,
  input  logic [3:0][CW-1:0]  sh,
  output logic [W-1:0]        y,
  output logic [3:0]          sticky
);
  always_comb begin
    logic signed [31:0] ne, ew;
    ne = nelem(mode);
    ew = W / ne;
    y = '0;
    sticky = '0;
    for (int e = 0; e < 4; e++) begin
      begin
        logic [W-1:0] m, v, lost;
        logic         sgn;
        logic signed [31:0] d;
        lost = '0;
        d = 0;
        for (int i = 0; i < W; i++) m[i] = (i < ew);
        case (ne)
          4:       v = (e < 4) ? W'(x[(e % 4) * (W / 4) +: W / 4]) : '0;
          2:       v = (e < 2) ? W'(x[(e % 2) * (W / 2) +: W / 2]) : '0;
          default: v = (e == 0) ? x : '0;
        endcase
        case (ne)
          4:       sgn = v[W / 4 - 1];
          2:       sgn = v[W / 2 - 1];
          default: sgn = v[W - 1];
        endcase
        for (int l = 0; l < CW; l++) begin
          d = 1 << l;
          if (sh[e][l]) begin
            lost = (d >= W) ? v : (v & ((W'(1) << d) - W'(1)));
            if (e < ne) sticky[e] |= (lost != '0);
            v = (d >= W) ? '0 : (v >> d);
            if (sgn) v |= m & ~((d >= W) ? '0 : (m >> d));
          end
        end
        case (ne)
          4:       if (e < 4) y[(e % 4) * (W / 4) +: W / 4] = v[W / 4 - 1:0];
          2:       if (e < 2) y[(e % 2) * (W / 2) +: W / 2] = v[W / 2 - 1:0];
          default: if (e == 0) y = v;
        endcase
      end
    end
  end
endmodule
