// vmac_pkg: types, control encodings and lane helpers shared by the vector
// multiply-accumulate unit (VMAC).
//
// A 32-bit operand vector holds 1x32, 2x16 or 4x8-bit numbers. Inside the
// datapath every vector is split into the same number of "lanes": the 4-bit
// sign/flag vectors give each element 4/NE bits (the element's value is
// replicated), the 32-bit scale-factor and fraction vectors give each element
// 32/NE bits, the 64-bit product vector 64/NE bits and the 128-bit quire vector
// 128/NE bits. In scalar ("full precision", vec=1) mode an 8- or 16-bit number
// uses the 1x32 lane layout, so it gets the whole 128-bit quire.
//
// Control encodings follow the precision/operation table of the design:
//   pre : 0X = 32-bit, 10 = 16-bit, 11 = 8-bit
//   op  : 000 Va*Vb+Vc, 001 Va*Vb-Vc, 010 Va*Vb, 100 acc+=Va*Vb, 101 acc-=Va*Vb
//   fmt : bit3 Va, bit2 Vb, bit1 Vc, bit0 Vr; 0 = posit, 1 = IEEE-754 (the
//         polarity is this design's choice)
//   es  : 3 bits per vector, [11:9] Va, [8:6] Vb, [5:3] Vc, [2:0] Vr; 8-bit
//         posits use only the two low bits of their segment (es <= 3).
//
// Follows the published architecture: the three layouts, the operation codes and
// the 128-bit quire. Own choices: the struct packing and the lane helpers.
package vmac_pkg;

  typedef enum logic [1:0] {
    LAY_1X32 = 2'd0,
    LAY_2X16 = 2'd1,
    LAY_4X8  = 2'd2
  } layout_e;

  localparam logic [2:0] OP_FMA    = 3'b000;
  localparam logic [2:0] OP_FMS    = 3'b001;
  localparam logic [2:0] OP_MUL    = 3'b010;
  localparam logic [2:0] OP_ACC    = 3'b100;
  localparam logic [2:0] OP_ACCSUB = 3'b101;

  localparam logic FMT_POSIT = 1'b0;
  localparam logic FMT_IEEE  = 1'b1;

  localparam int unsigned QUIRE_W = 128;  // reduced quire width
  localparam int unsigned QUIRE_CG = 8;   // sign + 7 carry-guard bits per element

  typedef struct packed {
    logic [2:0]  op;
    logic [1:0]  pre;
    logic        vec;
    logic [3:0]  fmt;
    logic [11:0] es;
  } ctrl_t;

  // Decoded fields vector (sign, scale factor, fraction and special flags).
  typedef struct packed {
    logic [3:0]  s;
    logic [31:0] sf;
    logic [31:0] f;
    logic [3:0]  z;
    logic [3:0]  nar;   // posit NaR, or IEEE qNaN
    logic [3:0]  snan;  // IEEE sNaN / invalid operation
    logic [3:0]  inf;   // IEEE infinity
  } fields_t;

  // Product vector leaving the Multiply stage.
  typedef struct packed {
    logic [3:0]  s;
    logic [31:0] sf;
    logic [63:0] m;     // Q1.y mantissa per 64/NE-bit lane
    logic [3:0]  z;
    logic [3:0]  nar;
    logic [3:0]  snan;
    logic [3:0]  inf;
  } prod_t;

  // Quire vector with its paired scale factor and flags.
  typedef struct packed {
    logic [127:0] q;
    logic [31:0]  sfq;
    logic [3:0]   rs;    // real sign (after the operation's negation)
    logic [3:0]   z;
    logic [3:0]   nar;
    logic [3:0]   snan;
    logic [3:0]   inf;
  } quire_t;

  // Result of the Quire Accumulate stage (also the accumulator register).
  typedef struct packed {
    logic [127:0] q;
    logic [31:0]  sfq;
    logic [3:0]   sticky;
    logic [3:0]   sexp;  // sign for zero / infinity results
    logic [3:0]   z;
    logic [3:0]   nar;
    logic [3:0]   snan;
    logic [3:0]   inf;
  } acc_t;

  // Normalized result fields entering the Encode stage.
  typedef struct packed {
    logic [3:0]  s;
    logic [31:0] sf;
    logic [31:0] f;      // per lane: leading bit at the lane MSB
    logic [3:0]  sticky;
    logic [3:0]  z;
    logic [3:0]  nar;
    logic [3:0]  snan;
    logic [3:0]  inf;
  } norm_t;

  function automatic layout_e layout_of(logic [1:0] pre, logic vec);
    if (!pre[1] || vec) return LAY_1X32;
    return pre[0] ? LAY_4X8 : LAY_2X16;
  endfunction

  function automatic int nbits_of(logic [1:0] pre);
    if (!pre[1]) return 32;
    return pre[0] ? 8 : 16;
  endfunction

  function automatic int nelem(layout_e l);
    case (l)
      LAY_4X8:  return 4;
      LAY_2X16: return 2;
      default:  return 1;
    endcase
  endfunction

  // Lane extraction / insertion on 32, 64 and 128-bit vectors. Lane widths
  // only take the three layout values, so every function is written as a
  // case over those widths: with the element index a loop constant, each
  // branch is plain wiring and no variable shifter is built.
  function automatic logic [31:0] mask32(int w);
    logic [31:0] m;
    for (int i = 0; i < 32; i++) m[i] = (i < w);
    return m;
  endfunction

  function automatic logic [127:0] mask128(int w);
    logic [127:0] m;
    for (int i = 0; i < 128; i++) m[i] = (i < w);
    return m;
  endfunction

  function automatic logic [31:0] get32(logic [31:0] v, int e, int w);
    case (w)
      8:       return (e < 4) ? 32'(v[(e % 4) * 8 +: 8]) : '0;
      16:      return (e < 2) ? 32'(v[(e % 2) * 16 +: 16]) : '0;
      default: return (e == 0) ? v : '0;
    endcase
  endfunction

  function automatic logic [31:0] put32(logic [31:0] v, int e, int w);
    logic [31:0] r;
    r = '0;
    case (w)
      8:       if (e < 4) r[(e % 4) * 8 +: 8] = v[7:0];
      16:      if (e < 2) r[(e % 2) * 16 +: 16] = v[15:0];
      default: if (e == 0) r = v;
    endcase
    return r;
  endfunction

  function automatic logic [63:0] get64(logic [63:0] v, int e, int w);
    case (w)
      16:      return (e < 4) ? 64'(v[(e % 4) * 16 +: 16]) : '0;
      32:      return (e < 2) ? 64'(v[(e % 2) * 32 +: 32]) : '0;
      default: return (e == 0) ? v : '0;
    endcase
  endfunction

  function automatic logic [63:0] put64(logic [63:0] v, int e, int w);
    logic [63:0] r;
    r = '0;
    case (w)
      16:      if (e < 4) r[(e % 4) * 16 +: 16] = v[15:0];
      32:      if (e < 2) r[(e % 2) * 32 +: 32] = v[31:0];
      default: if (e == 0) r = v;
    endcase
    return r;
  endfunction

  function automatic logic [127:0] get128(logic [127:0] v, int e, int w);
    case (w)
      32:      return (e < 4) ? 128'(v[(e % 4) * 32 +: 32]) : '0;
      64:      return (e < 2) ? 128'(v[(e % 2) * 64 +: 64]) : '0;
      default: return (e == 0) ? v : '0;
    endcase
  endfunction

  function automatic logic [127:0] put128(logic [127:0] v, int e, int w);
    logic [127:0] r;
    r = '0;
    case (w)
      32:      if (e < 4) r[(e % 4) * 32 +: 32] = v[31:0];
      64:      if (e < 2) r[(e % 2) * 64 +: 64] = v[63:0];
      default: if (e == 0) r = v;
    endcase
    return r;
  endfunction

  // Sign-extend the low w bits (w = 8, 16 or 32) of v to a 32-bit value.
  function automatic int sext(logic [31:0] v, int w);
    case (w)
      8:       return int'($signed(v[7:0]));
      16:      return int'($signed(v[15:0]));
      default: return int'($signed(v));
    endcase
  endfunction

  // Saturate a signed value to a w-bit (8, 16 or 32) two's complement range.
  function automatic int sat(int v, int w);
    int hi, lo;
    case (w)
      8:       hi = 127;
      16:      hi = 32767;
      default: hi = 32'sh7fff_ffff;
    endcase
    lo = -hi - 1;
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // Replicated-bit helpers for 4-bit sign/flag vectors: element e of ne
  // owns bits [e*4/ne +: 4/ne].
  function automatic logic lane_flag(logic [3:0] v, int e, int ne);
    case (ne)
      4:       return (e < 4) ? v[e % 4] : 1'b0;
      2:       return (e < 2) ? v[(e % 2) * 2] : 1'b0;
      default: return (e == 0) ? v[0] : 1'b0;
    endcase
  endfunction

  function automatic logic [3:0] flag_rep(logic b, int e, int ne);
    logic [3:0] r;
    r = '0;
    case (ne)
      4:       if (e < 4) r[e % 4] = b;
      2:       if (e < 2) r[(e % 2) * 2 +: 2] = {2{b}};
      default: if (e == 0) r = {4{b}};
    endcase
    return r;
  endfunction

  // IEEE-754 format parameters by precision (8-bit is the 1-4-3 microfloat).
  function automatic int ieee_e(int n);
    return (n == 32) ? 8 : (n == 16) ? 5 : 4;
  endfunction

  function automatic int ieee_m(int n);
    return (n == 32) ? 23 : (n == 16) ? 10 : 3;
  endfunction

  function automatic int ieee_bias(int n);
    return (1 << (ieee_e(n) - 1)) - 1;
  endfunction

  // Effective posit exponent size of a 3-bit es segment for precision n.
  function automatic int es_eff(logic [2:0] es, int n);
    return (n == 8) ? int'(es[1:0]) : int'(es);
  endfunction

endpackage
