// dht_top: 32-point discrete Hartley transform engine, split-radix, fully
// parallel and pipelined, with shared constant multipliers.
//
// A frame of N real samples enters in parallel and its N Hartley
// coefficients X(k) = sum_n x(n) (cos + sin)(2 pi n k / N) leave in parallel,
// in natural order. The fast clock clk drives the shared multipliers; the
// frame clock is the enable `in_ready`, high one cycle in SHARE (phase_ctrl).
// With the default SHARE = 4 every constant multiplier serves four products
// per frame, and the engine takes 32 samples per frame clock, i.e. every four
// fast cycles; SHARE = 1 gives dedicated multipliers and 32 samples per fast
// cycle.
//
// Interface: x_in is taken in the cycle where in_valid and in_ready are both
// high. The transform appears on y_out LAT frames later (LAT = 7 for
// N = 32, i.e. 28 fast cycles at SHARE = 4) and stays there for a frame;
// out_valid is a one-cycle strobe in the last cycle of that frame. The input
// is sign-extended to W bits; y_out is the unscaled transform in W bits
// (W - DW = 7 bits of headroom for the gain of at most N*sqrt(2)).
// Products are rounded to CW fractional bits, so y_out can differ from the
// exact transform by a few LSBs. MUL_STYLE 0 builds the multipliers as adder
// networks, 1 as lookup tables. Synchronous active-low reset.
// N = 32 and the four-way sharing are the design's; the widths, the
// handshake and the reset are this implementation's own.
module dht_top #(
  parameter int N         = 32,
  parameter int DW        = 16,
  parameter int W         = DW + 7,
  parameter int CW        = 16,
  parameter int SHARE     = 4,
  parameter int MUL_STYLE = 0,
  localparam int PW       = dht_pkg::phase_w(SHARE),
  localparam int LAT      = dht_pkg::lat_of(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] x_in  [N],
  output logic                 out_valid,
  output logic signed [W-1:0]  y_out [N],
  output logic [PW-1:0]        phase
);

  logic                tick;
  logic signed [W-1:0] xw [N];
  logic [LAT-1:0]      vld;

  phase_ctrl #(.SHARE(SHARE)) u_ctrl (.clk, .rst_n, .phase, .tick);

  always_comb
    for (int n = 0; n < N; n++) xw[n] = W'(x_in[n]);

  sr_dht #(.N(N), .W(W), .CW(CW), .SHARE(SHARE), .MUL_STYLE(MUL_STYLE)) u_core (
    .clk, .rst_n, .ce(tick), .phase, .x(xw), .y(y_out));

  // frame valid flags travel with the data, one stage per tick
  always_ff @(posedge clk) begin
    if (!rst_n)    vld <= '0;
    else if (tick) vld <= {vld[LAT-2:0], in_valid};
  end

  assign in_ready  = tick;
  assign out_valid = vld[LAT-1] & tick;

  // the output strobe marks a frame boundary, like the input handshake
  a_strobe_on_tick: assert property (@(posedge clk) disable iff (!rst_n)
                                     out_valid |-> in_ready)
    else $error("dht_top: out_valid off the frame tick");

endmodule
