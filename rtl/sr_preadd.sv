// sr_preadd: pre-adder of the two odd-index branches of a split-radix level.
//
// With a[n] = x[n] - x[n+N/2] (n = 0..N/2-1), M = N/4, A_n = a[n] and
// B_n = a[n+M], the coefficients X(4k+1) and X(4k+3) are M-point DHTs of
//   f1_n = (A_n + A_{M-n}) cos(2 pi n/N)  - (B_n - B_{M-n}) sin(2 pi n/N)
//   f3_n = (A_n - A_{M-n}) cos(2 pi 3n/N) + (B_n + B_{M-n}) sin(2 pi 3n/N)
// This block registers the four bracketed sums u1, v1, u3, v3 for
// n = 0..M-1 on ce. The reversed indices M-n are plain wiring. At n = 0 the
// sine factor is 0 and the cosine 1, so only u1[0] = a[0] + a[M] and
// u3[0] = a[0] - a[M] matter; v1[0] and v3[0] carry a[M] and are unused.
// One frame of latency; synchronous active-low reset.
// The equations are the design's; the register stage is this
// implementation's choice.
module sr_preadd #(
  parameter int N = 32,
  parameter int W = 23,
  localparam int M = N / 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic signed [W-1:0] a  [N/2],
  output logic signed [W-1:0] u1 [M],
  output logic signed [W-1:0] v1 [M],
  output logic signed [W-1:0] u3 [M],
  output logic signed [W-1:0] v3 [M]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < M; n++) begin
        u1[n] <= '0;
        v1[n] <= '0;
        u3[n] <= '0;
        v3[n] <= '0;
      end
    end else if (ce) begin
      u1[0] <= a[0] + a[M];
      u3[0] <= a[0] - a[M];
      v1[0] <= a[M];
      v3[0] <= a[M];
      for (int n = 1; n < M; n++) begin
        u1[n] <= a[n]   + a[M-n];
        v1[n] <= a[n+M] - a[2*M-n];
        u3[n] <= a[n]   - a[M-n];
        v3[n] <= a[n+M] + a[2*M-n];
      end
    end
  end

endmodule
