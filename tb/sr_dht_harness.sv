// sr_dht_harness: drives one sr_dht core of length N with its own phase
// counter and checks it. A new random frame enters on every frame tick;
// during the whole frame LAT frames later (LAT = dht_pkg::lat_of(N)) the
// output must equal the Hartley transform of that frame, computed here in
// double precision, within TOL LSBs.
module sr_dht_harness #(
  parameter int N         = 16,
  parameter int SHARE     = 4,
  parameter int MUL_STYLE = 0,
  parameter int FRAMES    = 40,
  parameter int TOL       = 8
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int W = 23, CW = 16, LAT = dht_pkg::lat_of(N), HD = 16;
  localparam int PW = dht_pkg::phase_w(SHARE);
  localparam real PI = 3.14159265358979323846;

  logic [PW-1:0] phase;
  logic tick;
  phase_ctrl #(.SHARE(SHARE)) u_ctrl (.clk, .rst_n, .phase, .tick);

  logic signed [W-1:0] x [N], y [N];
  int hist [HD][N];

  sr_dht #(.N(N), .W(W), .CW(CW), .SHARE(SHARE), .MUL_STYLE(MUL_STYLE)) u_dut (
    .clk, .rst_n, .ce(tick), .phase, .x, .y);

  int fr;       // frames taken so far
  initial begin
    checks = 0; failures = 0; done = 0; fr = 0;
    for (int n = 0; n < N; n++) x[n] = 0;
    @(posedge rst_n);
    while (fr < FRAMES + LAT + 1) begin
      @(negedge clk);
      // y now holds the transform of frame fr-LAT
      if (fr >= LAT) begin
        for (int k = 0; k < N; k++) begin
          real r, e;
          r = 0.0;
          for (int n = 0; n < N; n++)
            r += hist[(fr - LAT) % HD][n] * ($cos(2.0 * PI * n * k / N) + $sin(2.0 * PI * n * k / N));
          e = real'(y[k]) - r;
          checks++;
          if (e > TOL || e < -TOL) begin
            failures++;
            if (failures < 10) $display("ERROR: N=%0d frame %0d X(%0d) = %0d, expected %f", N, fr - LAT, k, y[k], r);
          end
        end
      end
      if (tick) begin          // x is taken at the coming rising edge
        for (int n = 0; n < N; n++) begin
          hist[fr % HD][n] = $signed(16'($urandom));
          x[n] = W'(hist[fr % HD][n]);
        end
        fr++;
      end
    end
    done = 1;
  end

endmodule
