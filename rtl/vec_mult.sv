// vec_mult: vectorized fraction multiplier, 1x32, 2x16 or 4x8-bit elements.
//
// A 4x4 array of 8-bit radix-4 Booth multipliers forms every byte product
// a[i] * b[j]. The layout enables the byte products that belong to one element
// (all 16 for 1x32; i and j in the same half for 2x16; i == j for 4x8) and
// disables the rest, and the enabled products, weighted by 2^(8(i+j)), are
// summed. Element e of an NE-element layout yields its 64/NE-bit product in
// p[e*64/NE +: 64/NE]. The two zero padding bits that every fraction element
// carries keep each product inside its own field. Purely combinational.
//
// Follows the published architecture: a 4x4 array of 8-bit Booth units enabled
// per layout. Own choice: a plain adder tree instead of carry-save compression.
module vec_mult
  import vmac_pkg::*;
(
  input  layout_e      mode,
  input  logic [31:0]  a,
  input  logic [31:0]  b,
  output logic [63:0]  p
);
  logic [15:0] bp [4][4];

  for (genvar i = 0; i < 4; i++) begin : g_row
    for (genvar j = 0; j < 4; j++) begin : g_col
      booth8 u_bm (.m(a[i*8 +: 8]), .x(b[j*8 +: 8]), .p(bp[i][j]));
    end
  end

  always_comb begin
    p = '0;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        logic en;
        case (mode)
          LAY_4X8:  en = (i == j);
          LAY_2X16: en = (i / 2 == j / 2);
          default:  en = 1'b1;
        endcase
        if (en) p = p + (64'(bp[i][j]) << (8 * (i + j)));
      end
    end
  end
endmodule
