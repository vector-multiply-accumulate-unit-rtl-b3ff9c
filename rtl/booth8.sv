// booth8: 8x8-bit unsigned radix-4 Booth multiplier.
//
// The multiplier x is extended with two leading zeros and a trailing zero and
// recoded in overlapping 3-bit groups into five digits in {-2,-1,0,+1,+2}.
// Each digit selects 0, M or 2M (M zero-extended to 10 bits); negative digits
// invert the selection and add a one at the digit's LSB position (two's
// complement). The five partial products, shifted by 2 bits per digit, are
// summed to the 16-bit product. Sign extension of the partial products uses
// the constant-ones technique (a leading ~sign bit on every row plus one
// correction constant) instead of replicated sign bits.
// Purely combinational.
//
// Follows the published architecture: radix-4 Booth recoding of an 8-bit
// segment. Own choice: partial products are summed to a binary result inside.
module booth8 (
  input  logic [7:0]  m,
  input  logic [7:0]  x,
  output logic [15:0] p
);
  always_comb begin
    logic [10:0] xe;
    logic [19:0] acc;
    xe  = {2'b00, x, 1'b0};
    acc = '0;
    for (int i = 0; i < 5; i++) begin
      logic [2:0] g;
      logic [9:0] sel;
      logic       neg;
      logic [10:0] row;
      g = xe[2*i +: 3];
      case (g)
        3'b001, 3'b010: sel = {2'b00, m};
        3'b011:         sel = {1'b0, m, 1'b0};
        3'b100:         sel = {1'b0, m, 1'b0};
        3'b101, 3'b110: sel = {2'b00, m};
        default:        sel = '0;
      endcase
      neg = g[2] & ~(g[1] & g[0]);
      // 10-bit magnitude, inverted when negative, with ~sign as row MSB
      row = {~neg, neg ? ~sel : sel};
      acc = acc + (20'(row) << (2 * i)) + (20'(neg) << (2 * i));
    end
    // correction constant for the ~sign encoding: -sum(2^(10+2i))
    acc = acc - 20'(20'h0_0400 + 20'h0_1000 + 20'h0_4000 + 20'h1_0000 + 20'h4_0000);
    p = acc[15:0];
  end
endmodule
