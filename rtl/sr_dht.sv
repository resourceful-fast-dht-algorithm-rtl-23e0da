// sr_dht: pipelined, fully parallel split-radix discrete Hartley transform.
//
// Computes X(k) = sum_n x(n) cas(2 pi n k / N), cas = cos + sin, for a frame
// of N real samples (N a power of two) by the split-radix rule
//   N-point DHT -> one N/2-point DHT + two N/4-point DHTs:
//   X(2k)   = DHT_{N/2}( x[n] + x[n+N/2] )
//   X(4k+1) = DHT_{N/4}( f1 ),  X(4k+3) = DHT_{N/4}( f3 )
// where f1, f3 are the rotated odd-branch sequences of sr_preadd/mul_block.
// The module instantiates itself for the shorter lengths down to N = 2
// (one add/subtract) and N = 1 (a wire). Per level: dht_addsub, then
// the even branch (sr_dht N/2) and the odd branch (sr_preadd, mul_block,
// two sr_dht N/4); the shorter branch is delayed so that both finish in the
// same frame, and the results are interleaved by wiring to y[2k], y[4k+1],
// y[4k+3]. N = 4 needs no multiplier.
//
// Timing: x is sampled on the frame tick ce; y holds the transform of that
// frame LAT ticks later (LAT = dht_pkg::lat_of(N), 7 for N = 32), stable for
// one frame. A new frame can enter on every tick. Values are signed W bits
// with no scaling; W must cover a gain of up to N*sqrt(2).
// The decomposition is the design's; the stage boundaries, latency balancing
// and the recursive structure are this implementation's own.
//
// Lint note: when this module is linted on its own as the top level, the
// linter reports ev, o1 and o3 as undriven. They are driven by the
// self-instances u_even, u_odd1 and u_odd3, which lint does not expand for
// a recursive top module. Instantiated from dht_top or a testbench, the
// recursion elaborates fully and these nets are driven (the tests check
// every output).
module sr_dht #(
  parameter int N         = 32,
  parameter int W         = 23,
  parameter int CW        = 16,
  parameter int SHARE     = 4,
  parameter int MUL_STYLE = 0,
  localparam int PW       = dht_pkg::phase_w(SHARE)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic [PW-1:0]       phase,
  input  logic signed [W-1:0] x [N],
  output logic signed [W-1:0] y [N]
);
  import dht_pkg::*;

  if (N == 1) begin : g_n1
    assign y = x;
  end else if (N == 2) begin : g_n2
    logic signed [W-1:0] s [1];
    logic signed [W-1:0] a [1];
    dht_addsub #(.N(2), .W(W)) u_bfly (.clk, .rst_n, .ce, .x, .s, .a);
    assign y[0] = s[0];
    assign y[1] = a[0];
  end else begin : g_split
    localparam int H     = N / 2;
    localparam int M     = N / 4;
    localparam int L_EV  = lat_of(H);
    localparam int L_OD  = 1 + ((M > 1) ? 1 : 0) + lat_of(M);
    localparam int L_MAX = (L_EV > L_OD) ? L_EV : L_OD;

    logic signed [W-1:0] s  [H];
    logic signed [W-1:0] a  [H];
    logic signed [W-1:0] ev [H];
    logic signed [W-1:0] evd[H];
    logic signed [W-1:0] u1 [M], v1 [M], u3 [M], v3 [M];
    logic signed [W-1:0] f1 [M], f3 [M];
    logic signed [W-1:0] o1 [M], o3 [M];
    logic signed [W-1:0] od [H], odd_d [H];

    dht_addsub #(.N(N), .W(W)) u_bfly (.clk, .rst_n, .ce, .x, .s, .a);

    // even outputs X(2k)
    sr_dht #(.N(H), .W(W), .CW(CW), .SHARE(SHARE), .MUL_STYLE(MUL_STYLE)) u_even (
      .clk, .rst_n, .ce, .phase, .x(s), .y(ev));

    // odd outputs X(4k+1), X(4k+3)
    sr_preadd #(.N(N), .W(W)) u_pre (.clk, .rst_n, .ce, .a, .u1, .v1, .u3, .v3);

    if (M > 1) begin : g_mul
      mul_block #(.N(N), .W(W), .CW(CW), .SHARE(SHARE), .MUL_STYLE(MUL_STYLE)) u_mul (
        .clk, .rst_n, .ce, .phase, .u1, .v1, .u3, .v3, .f1, .f3);
    end else begin : g_nomul
      assign f1 = u1;
      assign f3 = u3;
    end

    sr_dht #(.N(M), .W(W), .CW(CW), .SHARE(SHARE), .MUL_STYLE(MUL_STYLE)) u_odd1 (
      .clk, .rst_n, .ce, .phase, .x(f1), .y(o1));
    sr_dht #(.N(M), .W(W), .CW(CW), .SHARE(SHARE), .MUL_STYLE(MUL_STYLE)) u_odd3 (
      .clk, .rst_n, .ce, .phase, .x(f3), .y(o3));

    // latency balancing
    for (genvar k = 0; k < M; k++) begin : g_pack
      assign od[k]     = o1[k];
      assign od[M + k] = o3[k];
    end
    frame_delay #(.NW(H), .W(W), .D(L_MAX - L_EV)) u_dly_ev (.clk, .rst_n, .ce, .d(ev), .q(evd));
    frame_delay #(.NW(H), .W(W), .D(L_MAX - L_OD)) u_dly_od (.clk, .rst_n, .ce, .d(od), .q(odd_d));

    // output interleaving
    for (genvar k = 0; k < H; k++) begin : g_even_out
      assign y[2*k] = evd[k];
    end
    for (genvar k = 0; k < M; k++) begin : g_odd_out
      assign y[4*k+1] = odd_d[k];
      assign y[4*k+3] = odd_d[M + k];
    end
  end

endmodule
