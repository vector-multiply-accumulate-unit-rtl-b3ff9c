// vec_lzc: vectorized leading-zero counter over W bits.
//
// Each W/4-bit quarter is counted by a tree of 4-bit leading-zero counters
// (zero flags ANDed, the upper count selected unless the upper half is all
// zero, in which case the half width is added to the lower count). The
// quarter results are then merged into half and full-width counts the same
// way, and the layout picks which partial results are delivered:
//   LAY_4X8  : cnt[e] = count of quarter e
//   LAY_2X16 : cnt[0], cnt[1] = counts of the low and high halves
//   LAY_1X32 : cnt[0] = count of the whole word
// Element counts are saturated at the element width (all-zero element).
// Unused cnt slots are 0. Purely combinational.
//
// Follows the published architecture: a tree of 4-bit counters whose
// intermediate results serve each layout. Own choice: the all-zero output.
module vec_lzc
  import vmac_pkg::*;
#(
  parameter int unsigned W = 32,
  localparam int unsigned CW = $clog2(W) + 1
) (
  input  layout_e              mode,
  input  logic [W-1:0]         x,
  output logic [3:0][CW-1:0]   cnt,
  output logic [3:0]           allz
);
  localparam int unsigned Q = W / 4;

  // Leading-zero count of a 4-bit group.
  function automatic logic [2:0] lzc4(logic [3:0] v);
    casez (v)
      4'b1???: return 3'd0;
      4'b01??: return 3'd1;
      4'b001?: return 3'd2;
      4'b0001: return 3'd3;
      default: return 3'd4;
    endcase
  endfunction

  // Tree of 4-bit counters over one quarter.
  function automatic logic [CW-1:0] lzc_q(logic [Q-1:0] v);
    logic [CW-1:0] c [Q/4];
    logic          z [Q/4];
    logic signed [31:0] n, g;
    n = Q / 4;
    g = 4;
    for (int i = 0; i < Q / 4; i++) begin
      c[i] = CW'(lzc4(v[i*4 +: 4]));
      z[i] = (v[i*4 +: 4] == 4'd0);
    end
    while (n > 1) begin
      for (int i = 0; i < n / 2; i++) begin
        // element 2i+1 is the more significant group
        c[i] = z[2*i+1] ? (CW'(g) + c[2*i]) : c[2*i+1];
        z[i] = z[2*i+1] & z[2*i];
      end
      n = n / 2;
      g = g * 2;
    end
    return c[0];
  endfunction

  logic [CW-1:0] cq [4];
  logic [3:0]    zq;
  logic [CW-1:0] ch [2];
  logic [1:0]    zh;
  logic [CW-1:0] cf;

  always_comb begin
    for (int q = 0; q < 4; q++) begin
      cq[q] = lzc_q(x[q*Q +: Q]);
      zq[q] = (x[q*Q +: Q] == '0);
    end
    for (int h = 0; h < 2; h++) begin
      ch[h] = zq[2*h+1] ? (CW'(Q) + cq[2*h]) : cq[2*h+1];
      zh[h] = zq[2*h+1] & zq[2*h];
    end
    cf = zh[1] ? (CW'(2 * Q) + ch[0]) : ch[1];
    cnt  = '0;
    allz = '0;
    case (mode)
      LAY_4X8: begin
        for (int q = 0; q < 4; q++) begin
          cnt[q]  = cq[q];
          allz[q] = zq[q];
        end
      end
      LAY_2X16: begin
        cnt[0] = ch[0]; allz[0] = zh[0];
        cnt[1] = ch[1]; allz[1] = zh[1];
      end
      default: begin
        cnt[0] = cf; allz[0] = &zh;
      end
    endcase
  end
endmodule
