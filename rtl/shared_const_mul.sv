// shared_const_mul: one constant multiplier time-shared by several operands.
//
// NIN operands must all be multiplied by the same constant COEF/2^CW. Instead
// of NIN multipliers, ceil(NIN/SHARE) multipliers are built and each serves
// SHARE operands in turn: in phase k of a frame, a multiplexer hands operand
// m*SHARE+k to multiplier m and a demultiplexer stores its product in a
// staging register. In the last phase (the frame tick) all products, the
// last one straight from the multiplier, are copied to the output registers.
//
// Timing: the operands must be stable for a whole frame (SHARE cycles,
// starting right after a tick); p holds their products from the following
// tick for one frame, i.e. exactly one frame of latency.
// MUL_STYLE selects the multiplier: 0 adder network (csd_const_mul),
// 1 table lookup (lut_const_mul).
// Sharing a multiplier by four operands through multiplexers and
// demultiplexers is what the design prescribes; the staging registers and
// the output register bank are this implementation's own.
module shared_const_mul #(
  parameter int NIN       = 4,
  parameter int SHARE     = 4,
  parameter int W         = 23,
  parameter int CW        = 16,
  parameter int COEF      = 46341,
  parameter int MUL_STYLE = 0,
  localparam int PW       = dht_pkg::phase_w(SHARE)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic [PW-1:0]       phase,
  input  logic signed [W-1:0] x [NIN],
  output logic signed [W-1:0] p [NIN]
);

  localparam int NM = (NIN + SHARE - 1) / SHARE;   // physical multipliers

  logic signed [W-1:0] prod [NM];

  for (genvar m = 0; m < NM; m++) begin : g_mul
    logic signed [W-1:0] opnd;

    always_comb begin
      opnd = '0;
      for (int k = 0; k < SHARE; k++)
        if (m * SHARE + k < NIN && phase == PW'(k)) opnd = x[m*SHARE+k];
    end

    if (MUL_STYLE == 1) begin : g_lut
      lut_const_mul #(.W(W), .CW(CW), .COEF(COEF)) u_mul (.x(opnd), .p(prod[m]));
    end else begin : g_csd
      csd_const_mul #(.W(W), .CW(CW), .COEF(COEF)) u_mul (.x(opnd), .p(prod[m]));
    end
  end

  logic signed [W-1:0] stage [NM][SHARE];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < NM; m++)
        for (int k = 0; k < SHARE; k++) stage[m][k] <= '0;
      for (int i = 0; i < NIN; i++) p[i] <= '0;
    end else begin
      for (int m = 0; m < NM; m++)
        for (int k = 0; k < SHARE; k++)
          if (phase == PW'(k)) stage[m][k] <= prod[m];
      if (ce)
        for (int m = 0; m < NM; m++)
          for (int k = 0; k < SHARE; k++)
            if (m * SHARE + k < NIN)
              p[m*SHARE+k] <= (k == SHARE - 1) ? prod[m] : stage[m][k];
    end
  end

  // usage rule: the frame tick may only come in the last phase, otherwise
  // products of the staging registers would be stale
  a_ce_last_phase: assert property (@(posedge clk) disable iff (!rst_n)
                                    ce |-> (phase == PW'(SHARE - 1)))
    else $error("shared_const_mul: ce outside the last phase");

endmodule
