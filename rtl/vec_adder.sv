// vec_adder: W-bit adder that can act as one W-bit, two W/2-bit or four
// W/4-bit adders (layout LAY_1X32 / LAY_2X16 / LAY_4X8).
//
// The carry chain is built from four W/4-bit sub-adders. A split multiplexer in
// front of each sub-adder picks either the carry-out of the sub-adder below or
// the external carry-in of that quarter: the middle split is active for 2- and
// 4-element layouts, the outer two only for 4 elements. cin[q] is the carry-in
// used when quarter q starts an element; cout[q] is the carry-out of quarter q
// (the element's carry-out is the one of its top quarter). Subtraction is done
// by the caller by inverting the subtrahend and setting the carry-in.
// Purely combinational.
//
// Follows the published architecture: a carry chain split by multiplexers at
// element boundaries. Own choice: a carry-in per quarter.
module vec_adder
  import vmac_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  layout_e        mode,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic [3:0]     cin,
  output logic [W-1:0]   sum,
  output logic [3:0]     cout
);
  localparam int unsigned Q = W / 4;

  logic [3:0] split;

  always_comb begin
    logic carry;
    carry = 1'b0;
    split[0] = 1'b1;
    split[1] = (mode == LAY_4X8);
    split[2] = (mode != LAY_1X32);
    split[3] = (mode == LAY_4X8);
    for (int q = 0; q < 4; q++) begin
      logic       ci;
      logic [Q:0] t;
      ci = split[q] ? cin[q] : carry;
      t = {1'b0, a[q*Q +: Q]} + {1'b0, b[q*Q +: Q]} + {{Q{1'b0}}, ci};
      sum[q*Q +: Q] = t[Q-1:0];
      cout[q] = t[Q];
      carry = t[Q];
    end
  end
endmodule
