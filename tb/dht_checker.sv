// dht_checker: stimulus and scoreboard for one dht_top instance.
//
// Offers NFRAMES frames on the in_valid/in_ready handshake, leaving a bubble
// (in_valid low) now and then, and checks every out_valid strobe against
// the Hartley transform X(k) = sum_n x(n) (cos + sin)(2 pi n k/N) computed
// here in double precision. A coefficient passes when it is within TOL LSBs
// of the exact value. It also checks that each frame comes out exactly
// LAT*SHARE clock cycles after it was accepted, that no strobe arrives for
// a bubble, and counts the pipeline mechanisms it saw.
// Frames: an impulse, a constant, full-scale frames whose signs follow
// cas(2 pi n k0/N) (the largest output the engine must carry), then random
// full-scale data.
module dht_checker #(
  parameter int N       = 32,
  parameter int DW      = 16,
  parameter int W       = 23,
  parameter int SHARE   = 4,
  parameter int LAT     = 7,
  parameter int NFRAMES = 40,
  parameter int TOL     = 12
) (
  input  logic                 clk,
  output logic                 in_valid,
  input  logic                 in_ready,
  output logic signed [DW-1:0] x_in  [N],
  input  logic                 out_valid,
  input  logic signed [W-1:0]  y_out [N],
  input  logic [31:0]          phase,
  output int                   checks,
  output int                   failures,
  output int                   n_bubbles,
  output int                   n_overlap,
  output int                   n_phases,
  output int                   max_err,
  output logic                 done
);

  localparam real PI = 3.14159265358979323846;
  localparam int  QD = 64;

  int   mem [QD][N];
  longint acc_cyc [QD];
  int   wp, rp, sent, recv, inflight;
  longint cyc;
  logic [31:0] seen_phase;

  initial begin
    checks = 0; failures = 0; n_bubbles = 0; n_overlap = 0; n_phases = 0;
    max_err = 0; done = 0; wp = 0; rp = 0; sent = 0; recv = 0; cyc = 0;
    in_valid = 0; seen_phase = 0;
    for (int n = 0; n < N; n++) x_in[n] = '0;
  end

  always @(posedge clk) cyc <= cyc + 1;

  function automatic int gen(int f, int n);
    int mx;
    real c;
    mx = (1 << (DW - 1)) - 1;
    if (f == 0) return (n == 0) ? mx : 0;
    if (f == 1) return -mx;
    if (f < 2 + N / 4) begin
      c = $cos(2.0 * PI * n * (f - 2) / N) + $sin(2.0 * PI * n * (f - 2) / N);
      return (c >= 0.0) ? mx : -mx - 1;
    end
    return int'($urandom_range(2 * mx + 1, 0)) - mx - 1;
  endfunction

  always @(negedge clk) begin
    if (!done) begin
      if (phase < 32) seen_phase[phase[4:0]] = 1'b1;
      // scoreboard
      if (out_valid) begin
        real r;
        int  e;
        if (recv == sent) begin
          failures++;
          $display("ERROR: out_valid with no frame in flight");
        end else begin
          checks++;
          if (cyc - acc_cyc[rp] != longint'(LAT * SHARE)) begin
            failures++;
            $display("ERROR: latency %0d cycles, expected %0d", cyc - acc_cyc[rp], LAT * SHARE);
          end
          for (int k = 0; k < N; k++) begin
            r = 0.0;
            for (int n = 0; n < N; n++)
              r += real'(mem[rp][n]) * ($cos(2.0 * PI * n * k / N) + $sin(2.0 * PI * n * k / N));
            e = int'(real'(y_out[k]) - r);
            if (e < 0) e = -e;
            if (e > max_err) max_err = e;
            checks++;
            if (e > TOL) begin
              failures++;
              if (failures < 10)
                $display("ERROR: frame %0d X(%0d) = %0d, expected %f", recv, k, y_out[k], r);
            end
          end
          rp = (rp + 1) % QD;
          recv++;
        end
      end
      // stimulus, taken at the next rising edge when in_ready is high
      if (in_ready) begin
        inflight = sent - recv;
        if (sent < NFRAMES && !(sent > 4 && $urandom_range(4, 0) == 0)) begin
          in_valid = 1'b1;
          for (int n = 0; n < N; n++) begin
            mem[wp][n] = gen(sent, n);
            x_in[n]    = DW'(mem[wp][n]);
          end
          acc_cyc[wp] = cyc;
          wp = (wp + 1) % QD;
          sent++;
          if (inflight > 0) n_overlap++;
        end else begin
          in_valid = 1'b0;
          if (sent < NFRAMES) n_bubbles++;
          for (int n = 0; n < N; n++) x_in[n] = DW'($urandom);
        end
      end
      if (sent == NFRAMES && recv == NFRAMES) begin
        n_phases = $countones(seen_phase);
        done = 1'b1;
      end
    end
  end

endmodule
