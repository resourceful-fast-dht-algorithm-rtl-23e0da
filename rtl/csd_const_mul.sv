// csd_const_mul: multiplier by a fixed constant, built as an adder network.
//
// p = round(x * COEF / 2^CW), x and p signed W bits, COEF a non-negative
// constant below 2^(CW+1). While the design elaborates, COEF is recoded into
// canonical signed digits (digits 1, 0 and -1 with no two nonzero digits
// adjacent), so the product needs one adder per nonzero digit. Digit pairs
// "1 0 1" and "1 0 -1" recur in these recodings; the two subexpressions 5x and
// 3x that they stand for are formed once and reused by every pair, which
// removes one adder per pair. The sum is rounded half up and truncated to W
// bits (the caller keeps the value in range).
// Purely combinational; no clock.
// The adder-network form and subexpression sharing follow the multiplier
// structure the design is based on; the choice of the 5x/3x pair patterns and
// the rounding are this implementation's own.
module csd_const_mul #(
  parameter int W    = 23,
  parameter int CW   = 16,
  parameter int COEF = 46341
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] p
);

  localparam int ND = CW + 3;        // CSD digits needed for COEF < 2^(CW+1)
  localparam int AW = W + CW + 4;    // accumulator width

  // term codes: 0 none, 1 +x, 2 -x, 3 +5x, 4 -5x, 5 +3x, 6 -3x
  typedef logic [ND-1:0][2:0] terms_t;

  function automatic terms_t recode();
    int d [0:ND+1];
    longint v;
    terms_t t;
    v = longint'(COEF);
    for (int i = 0; i < ND + 2; i++) begin
      if (v % 2 == 0) d[i] = 0;
      else if (v % 4 == 1) d[i] = 1;
      else d[i] = -1;
      v = (v - longint'(d[i])) / 2;
    end
    t = '0;
    for (int i = 0; i < ND; i++) begin
      if (d[i] != 0) begin
        if (i + 2 < ND && d[i+2] != 0) begin
          // pair: d[i+2]*4 + d[i]  -> +-5 or +-3 times x, placed at i
          if (d[i+2] == d[i]) t[i] = (d[i] > 0) ? 3'd3 : 3'd4;
          else                t[i] = (d[i+2] > 0) ? 3'd5 : 3'd6;
          d[i+2] = 0;
        end else begin
          t[i] = (d[i] > 0) ? 3'd1 : 3'd2;
        end
      end
    end
    return t;
  endfunction

  localparam terms_t TERMS = recode();

  logic signed [AW-1:0] x1, x5, x3, acc, rnd;

  always_comb begin
    x1  = AW'(x);
    x5  = (x1 <<< 2) + x1;   // shared subexpression "1 0 1"
    x3  = (x1 <<< 2) - x1;   // shared subexpression "1 0 -1"
    acc = '0;
    for (int i = 0; i < ND; i++) begin
      case (TERMS[i])
        3'd1:    acc = acc + (x1 <<< i);
        3'd2:    acc = acc - (x1 <<< i);
        3'd3:    acc = acc + (x5 <<< i);
        3'd4:    acc = acc - (x5 <<< i);
        3'd5:    acc = acc + (x3 <<< i);
        3'd6:    acc = acc - (x3 <<< i);
        default: acc = acc;
      endcase
    end
    rnd = (acc + (AW'(1) <<< (CW - 1))) >>> CW;
    p   = rnd[W-1:0];
  end

endmodule
