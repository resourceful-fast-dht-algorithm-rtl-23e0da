// mul_block: twiddle (MUL) stage of one split-radix DHT level of length N.
//
// Inputs are the registered pre-adder sums u1, v1, u3, v3 (see sr_preadd),
// M = N/4 of each. For n = 1..M-1 it forms
//   f1[n] = u1[n] cos(2 pi n/N)  - v1[n] sin(2 pi n/N)
//   f3[n] = u3[n] cos(2 pi 3n/N) + v3[n] sin(2 pi 3n/N)
// and passes f1[0] = u1[0], f3[0] = u3[0] through a register.
// These 4(M-1) products use only the M-1 magnitudes C_j = cos(2 pi j/N),
// j = 1..M-1, each exactly four times. All products with the same C_j go to
// one shared_const_mul, so with SHARE = 4 a level has M-1 multipliers
// (7 for N = 32, 3 for N = 16, 1 for N = 8). The signs of cos and sin are
// applied in the adders that combine the products.
//
// Timing: u/v stable for a frame after a tick; f1/f3 valid from the next
// tick, one frame of latency. The combining adders sit after the product
// registers and feed the next stage's registers.
// Sharing each multiplier among the four products with the same constant
// follows the design; the grouping of products into one block per level is
// this implementation's own.
module mul_block #(
  parameter int N         = 32,
  parameter int W         = 23,
  parameter int CW        = 16,
  parameter int SHARE     = 4,
  parameter int MUL_STYLE = 0,
  localparam int M        = N / 4,
  localparam int PW       = dht_pkg::phase_w(SHARE)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic [PW-1:0]       phase,
  input  logic signed [W-1:0] u1 [M],
  input  logic signed [W-1:0] v1 [M],
  input  logic signed [W-1:0] u3 [M],
  input  logic signed [W-1:0] v3 [M],
  output logic signed [W-1:0] f1 [M],
  output logic signed [W-1:0] f3 [M]
);
  import dht_pkg::*;

  localparam int K  = M - 1;      // nontrivial indices n = 1..K
  localparam int NS = 4 * K;      // product slots

  logic signed [W-1:0] opnd [NS];
  logic signed [W-1:0] prod [NS];

  // operand of every slot: branch 0 uses u1/v1, branch 1 uses u3/v3
  for (genvar s = 0; s < NS; s++) begin : g_slot
    localparam int BR = slot_br(N, s);
    localparam int I  = slot_i(N, s);
    localparam int T  = slot_t(s);
    if (BR == 0) begin : g_b1
      assign opnd[s] = (T == 0) ? u1[I] : v1[I];
    end else begin : g_b3
      assign opnd[s] = (T == 0) ? u3[I] : v3[I];
    end
  end

  // one shared multiplier per constant magnitude
  for (genvar j = 1; j <= K; j++) begin : g_const
    localparam int NU = uses_of(N, j);
    logic signed [W-1:0] xs [NU];
    logic signed [W-1:0] ps [NU];
    for (genvar q = 0; q < NU; q++) begin : g_use
      assign xs[q] = opnd[slot_of(N, j, q)];
      assign prod[slot_of(N, j, q)] = ps[q];
    end
    shared_const_mul #(
      .NIN(NU), .SHARE(SHARE), .W(W), .CW(CW),
      .COEF(qcos(N, j, CW)), .MUL_STYLE(MUL_STYLE)
    ) u_smul (
      .clk, .rst_n, .ce, .phase, .x(xs), .p(ps)
    );
  end

  // n = 0 terms need no multiplication, only the matching frame of delay
  logic signed [W-1:0] f1_0, f3_0;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f1_0 <= '0;
      f3_0 <= '0;
    end else if (ce) begin
      f1_0 <= u1[0];
      f3_0 <= u3[0];
    end
  end

  // combine: for index n the cosine and sine products sit in slots
  // 2(n-1) and 2(n-1)+1 of branch 0, and 2K + 2(n-1) (+1) of branch 1

  function automatic logic signed [W-1:0] sgn(logic signed [W-1:0] v, bit neg);
    return neg ? -v : v;
  endfunction

  always_comb begin
    f1[0] = f1_0;
    f3[0] = f3_0;
    for (int n = 1; n <= K; n++) begin
      f1[n] = sgn(prod[2*(n-1)],       slot_neg(N, 2*(n-1)))
            - sgn(prod[2*(n-1)+1],     slot_neg(N, 2*(n-1)+1));
      f3[n] = sgn(prod[2*K+2*(n-1)],   slot_neg(N, 2*K+2*(n-1)))
            + sgn(prod[2*K+2*(n-1)+1], slot_neg(N, 2*K+2*(n-1)+1));
    end
  end

endmodule
