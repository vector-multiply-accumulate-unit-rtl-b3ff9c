// vmac: unified posit / IEEE-754 vector multiply-accumulate unit.
//
// Three 32-bit operand vectors Va, Vb, Vc each hold 1x32, 2x16 or 4x8-bit
// numbers (or one 8/16-bit scalar with vec=1) in posit (run-time exponent
// size) or IEEE-754 format, chosen per operand. The unit computes, per element,
// Va*Vb+Vc, Va*Vb-Vc, Va*Vb, acc+=Va*Vb or acc-=Va*Vb (op, see vmac_pkg) and
// returns Vr in the result's own format and exponent size.
//
// Six pipeline stages, each ending in a register:
//   1 Decode          three decode_stage instances (Va, Vb, Vc)
//   2 Multiply        multiply_stage (vector Booth multiplier)
//   3 Quire Scale     quire_scale (product and Vc to 128-bit reduced quire)
//   4 Quire Accumulate quire_accumulate (alignment, add, accumulator register)
//   5 Normalize       normalize_stage
//   6 Encode          encode_stage
// Timing: one operation per cycle, result 6 cycles after in_valid
// (out_valid marks it). Back-to-back accumulations need no stall: the
// accumulator is written at the end of stage 4 and read in the same stage by
// the following operation. The accumulator starts at +0 after reset; a new
// dot product is started with a non-accumulating operation (for instance
// Va*Vb+0), whose result also loads the accumulator.
// Flags (per element, replicated over 4/NE bits): nv invalid, of overflow,
// uf underflow, nx inexact; only for IEEE results.
//
// Follows the published architecture: six stages and one operation per cycle.
// Own choices: the valid handshake and the scalar operand position.
module vmac
  import vmac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [2:0]  op,
  input  logic [1:0]  pre,
  input  logic        vec,
  input  logic [3:0]  fmt,
  input  logic [11:0] es,
  input  logic [31:0] va,
  input  logic [31:0] vb,
  input  logic [31:0] vc,
  output logic        out_valid,
  output logic [31:0] vr,
  output logic [3:0]  flag_nv,
  output logic [3:0]  flag_of,
  output logic [3:0]  flag_uf,
  output logic [3:0]  flag_nx
);
  ctrl_t ctl0;
  assign ctl0 = '{op: op, pre: pre, vec: vec, fmt: fmt, es: es};

  // ---------------- stage 1: decode ----------------
  fields_t da, db, dc;
  decode_stage u_dec_a (.pre(pre), .vec(vec), .fmt(fmt[3]), .es(es[11:9]), .x(va), .d(da));
  decode_stage u_dec_b (.pre(pre), .vec(vec), .fmt(fmt[2]), .es(es[8:6]),  .x(vb), .d(db));
  decode_stage u_dec_c (.pre(pre), .vec(vec), .fmt(fmt[1]), .es(es[5:3]),  .x(vc), .d(dc));

  logic    v1;
  ctrl_t   c1;
  fields_t a1, b1, cc1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; c1 <= '0; a1 <= '0; b1 <= '0; cc1 <= '0;
    end else begin
      v1 <= in_valid; c1 <= ctl0; a1 <= da; b1 <= db; cc1 <= dc;
    end
  end

  // ---------------- stage 2: multiply ----------------
  layout_e lay1;
  prod_t   pm;
  assign lay1 = layout_of(c1.pre, c1.vec);
  multiply_stage u_mul (.lay(lay1), .a(a1), .b(b1), .p(pm));

  logic    v2;
  ctrl_t   c2;
  prod_t   p2;
  fields_t cc2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; c2 <= '0; p2 <= '0; cc2 <= '0;
    end else begin
      v2 <= v1; c2 <= c1; p2 <= pm; cc2 <= cc1;
    end
  end

  // ---------------- stage 3: quire scale ----------------
  layout_e lay2;
  quire_t  qp, qc;
  assign lay2 = layout_of(c2.pre, c2.vec);
  quire_scale u_qs (.lay(lay2), .op(c2.op), .p(p2), .c(cc2), .qp(qp), .qc(qc));

  logic   v3;
  ctrl_t  c3;
  quire_t qp3, qc3;
  logic [3:0] sp3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3 <= 1'b0; c3 <= '0; qp3 <= '0; qc3 <= '0; sp3 <= '0;
    end else begin
      v3 <= v2; c3 <= c2; qp3 <= qp; qc3 <= qc; sp3 <= p2.s;
    end
  end

  // ---------------- stage 4: quire accumulate ----------------
  layout_e lay3;
  acc_t    qa, acc_q;
  assign lay3 = layout_of(c3.pre, c3.vec);
  quire_accumulate u_qa (
    .clk(clk), .rst_n(rst_n), .valid(v3), .lay(lay3), .op(c3.op), .sp(sp3),
    .qp(qp3), .qc(qc3), .res(qa), .acc_q(acc_q)
  );

  logic  v4;
  ctrl_t c4;
  acc_t  q4;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v4 <= 1'b0; c4 <= '0; q4 <= '0;
    end else begin
      v4 <= v3; c4 <= c3; q4 <= qa;
    end
  end

  // ---------------- stage 5: normalize ----------------
  layout_e lay4;
  norm_t   nm;
  assign lay4 = layout_of(c4.pre, c4.vec);
  normalize_stage u_norm (.lay(lay4), .a(q4), .o(nm));

  logic  v5;
  ctrl_t c5;
  norm_t n5;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v5 <= 1'b0; c5 <= '0; n5 <= '0;
    end else begin
      v5 <= v4; c5 <= c4; n5 <= nm;
    end
  end

  // ---------------- stage 6: encode ----------------
  logic [31:0] ye;
  logic [3:0]  env, eof, euf, enx;
  encode_stage u_enc (
    .pre(c5.pre), .vec(c5.vec), .fmt(c5.fmt[0]), .es(c5.es[2:0]), .r(n5),
    .y(ye), .nv(env), .of(eof), .uf(euf), .nx(enx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; vr <= '0;
      flag_nv <= '0; flag_of <= '0; flag_uf <= '0; flag_nx <= '0;
    end else begin
      out_valid <= v5; vr <= ye;
      flag_nv <= env; flag_of <= eof; flag_uf <= euf; flag_nx <= enx;
    end
  end
endmodule
