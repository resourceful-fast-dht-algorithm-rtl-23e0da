// lut_const_mul: multiplier by a fixed constant from read-only tables.
//
// p = round(x * COEF / 2^CW), x and p signed W bits, COEF a non-negative
// constant below 2^(CW+1). Because one operand is fixed, every partial
// product can be stored beforehand: the operand is cut into LB-bit slices and
// each slice addresses a table of 2^LB words holding slice * COEF. The lower
// slices are unsigned; the top slice carries the sign bit, so its table holds
// signed products. The table outputs, shifted to their slice positions, are
// added, rounded half up and truncated to W bits. With LB = W there is a
// single table of 2^W words. The tables are computed while the design
// elaborates and map to ROM or logic.
// Purely combinational; no clock.
// Storing precomputed partial products of a constant is the technique the
// design is based on; slicing the operand (instead of one 2^W-word table)
// and the rounding are this implementation's own.
module lut_const_mul #(
  parameter int W    = 23,
  parameter int CW   = 16,
  parameter int COEF = 46341,
  parameter int LB   = 4
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] p
);

  localparam int NS = (W + LB - 1) / LB;     // number of slices
  localparam int TB = W - (NS - 1) * LB;     // bits of the top (signed) slice
  localparam int TW = LB + CW + 3;           // table word width
  localparam int AW = W + CW + 4;            // accumulator width

  typedef logic [(1<<LB)-1:0][TW-1:0] tab_t;
  typedef logic [(1<<TB)-1:0][TW-1:0] top_t;

  function automatic tab_t mk_tab();
    tab_t t;
    for (int v = 0; v < (1 << LB); v++) t[v] = TW'(longint'(v) * COEF);
    return t;
  endfunction

  function automatic top_t mk_top();
    top_t t;
    longint sv;
    for (int v = 0; v < (1 << TB); v++) begin
      sv   = (v >= (1 << (TB - 1))) ? longint'(v) - (longint'(1) << TB) : longint'(v);
      t[v] = TW'(sv * COEF);
    end
    return t;
  endfunction

  localparam tab_t TAB = mk_tab();
  localparam top_t TOP = mk_top();

  logic [W-1:0]         xu;
  logic [LB-1:0]        sl;
  logic [TB-1:0]        st;
  logic signed [TW-1:0] word;
  logic signed [AW-1:0] acc, rnd;

  always_comb begin
    xu  = x;
    acc = '0;
    for (int i = 0; i < NS - 1; i++) begin
      sl   = xu[i*LB +: LB];
      word = TAB[sl];
      acc  = acc + (AW'($unsigned(word)) <<< (i * LB));
    end
    st   = xu[W-1 -: TB];
    word = TOP[st];
    acc  = acc + (AW'(word) <<< ((NS - 1) * LB));
    rnd  = (acc + (AW'(1) <<< (CW - 1))) >>> CW;
    p    = rnd[W-1:0];
  end

endmodule
