// mul_block_harness: drives one mul_block of length N with its own phase
// counter and checks it. Random u1, v1, u3, v3 are applied right after each
// frame tick; after the next tick the outputs must be, within the rounding bound,
//   f1[n] = u1 cos(2 pi n/N)  - v1 sin(2 pi n/N)
//   f3[n] = u3 cos(2 pi 3n/N) + v3 sin(2 pi 3n/N)
// (double precision; bound 1 LSB + (|u|+|v|)/2^(CW+1)) for the operands
// of the frame before, and must hold
// for the whole frame.
module mul_block_harness #(
  parameter int N         = 32,
  parameter int SHARE     = 4,
  parameter int MUL_STYLE = 0,
  parameter int FRAMES    = 60
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int W = 23, CW = 16, M = N / 4;
  localparam int PW = dht_pkg::phase_w(SHARE);
  localparam real PI = 3.14159265358979323846;

  logic [PW-1:0] phase;
  logic tick;
  phase_ctrl #(.SHARE(SHARE)) u_ctrl (.clk, .rst_n, .phase, .tick);

  logic signed [W-1:0] u1 [M], v1 [M], u3 [M], v3 [M], f1 [M], f3 [M];
  int pu1 [M], pv1 [M], pu3 [M], pv3 [M];

  mul_block #(.N(N), .W(W), .CW(CW), .SHARE(SHARE), .MUL_STYLE(MUL_STYLE)) u_dut (
    .clk, .rst_n, .ce(tick), .phase, .u1, .v1, .u3, .v3, .f1, .f3);

  // error bound: two roundings of 1/2 LSB plus the constants' quantisation,
  // at most 2^-(CW+1) of each operand
  function automatic void cmp(logic signed [W-1:0] got, real exp, string what, int n, int a, int b);
    real e, tol;
    checks++;
    e   = real'(got) - exp;
    tol = 1.0 + (((a < 0) ? -a : a) + ((b < 0) ? -b : b)) / real'(2 ** (CW + 1));
    if (e > tol || e < -tol) begin
      failures++;
      if (failures < 10) $display("ERROR: N=%0d %s[%0d] = %0d, expected %f", N, what, n, got, exp);
    end
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int n = 0; n < M; n++) begin
      u1[n] = 0; v1[n] = 0; u3[n] = 0; v3[n] = 0;
      pu1[n] = 0; pv1[n] = 0; pu3[n] = 0; pv3[n] = 0;
    end
    @(posedge rst_n);
    for (int fr = 0; fr < FRAMES; ) begin
      @(posedge clk); #1;
      if (tick == 1'b0 && phase == '0) begin  // first cycle of a frame
        fr++;
        for (int n = 0; n < M; n++) begin
          pu1[n] = u1[n]; pv1[n] = v1[n]; pu3[n] = u3[n]; pv3[n] = v3[n];
          u1[n] = W'($signed(20'($urandom))); v1[n] = W'($signed(20'($urandom)));
          u3[n] = W'($signed(20'($urandom))); v3[n] = W'($signed(20'($urandom)));
        end
      end
      if (SHARE == 1 || !(tick == 1'b0 && phase == '0)) begin
        if (SHARE == 1) begin
          fr++;
          for (int n = 0; n < M; n++) begin
            pu1[n] = u1[n]; pv1[n] = v1[n]; pu3[n] = u3[n]; pv3[n] = v3[n];
          end
        end
      end
      if (fr > 1) begin
        cmp(f1[0], real'(pu1[0]), "f1", 0, 0, 0);
        cmp(f3[0], real'(pu3[0]), "f3", 0, 0, 0);
        for (int n = 1; n < M; n++) begin
          cmp(f1[n], pu1[n] * $cos(2.0 * PI * n / N) - pv1[n] * $sin(2.0 * PI * n / N), "f1", n, pu1[n], pv1[n]);
          cmp(f3[n], pu3[n] * $cos(2.0 * PI * 3 * n / N) + pv3[n] * $sin(2.0 * PI * 3 * n / N), "f3", n, pu3[n], pv3[n]);
        end
      end
      if (SHARE == 1)
        for (int n = 0; n < M; n++) begin
          u1[n] = W'($signed(20'($urandom))); v1[n] = W'($signed(20'($urandom)));
          u3[n] = W'($signed(20'($urandom))); v3[n] = W'($signed(20'($urandom)));
        end
    end
    done = 1;
  end

endmodule
