// vec_lshift: vectorized logical left barrel shifter over W bits.
//
// Every element of the layout (1, 2 or 4 elements of W/NE bits) is shifted
// left by its own amount sh[e]; bits shifted past the element's MSB are
// dropped and never reach the neighbouring element, zeros enter at the LSB.
// The shifter is built as log2(W) multiplexer levels per element. sh[e] >= the
// element width clears the element. Purely combinational.
//
// Follows the published architecture in function: one shift amount per element.
// Own choice: written as per-element multiplexer levels, not shared shifters.
module vec_lshift
  import vmac_pkg::*;
#(
  parameter int unsigned W = 128,
  localparam int unsigned CW = $clog2(W) + 1
) (
  input  layout_e             mode,
  input  logic [W-1:0]        x,
  input  logic [3:0][CW-1:0]  sh,
  output logic [W-1:0]        y
);
  always_comb begin
    logic signed [31:0] ne, ew;
    ne = nelem(mode);
    ew = W / ne;
    y = '0;
    for (int e = 0; e < 4; e++) begin
      begin
        logic [W-1:0] m, v;
        for (int i = 0; i < W; i++) m[i] = (i < ew);
        case (ne)
          4:       v = (e < 4) ? W'(x[(e % 4) * (W / 4) +: W / 4]) : '0;
          2:       v = (e < 2) ? W'(x[(e % 2) * (W / 2) +: W / 2]) : '0;
          default: v = (e == 0) ? x : '0;
        endcase
        // multiplexer levels of the barrel shifter
        for (int l = 0; l < CW; l++)
          if (sh[e][l]) v = (v << (1 << l)) & m;
        case (ne)
          4:       if (e < 4) y[(e % 4) * (W / 4) +: W / 4] = v[W / 4 - 1:0];
          2:       if (e < 2) y[(e % 2) * (W / 2) +: W / 2] = v[W / 2 - 1:0];
          default: if (e == 0) y = v;
        endcase
      end
    end
  end
endmodule
