// dht_addsub: first add/subtract layer of a split-radix DHT level.
//
// For a frame x[0..N-1] it registers, for n = 0..N/2-1,
//   s[n] = x[n] + x[n+N/2]   (input of the half-length DHT giving X(2k))
//   a[n] = x[n] - x[n+N/2]   (input of the odd-index branches)
// on the frame clock enable ce. For N = 2 this is the whole 2-point DHT
// (X0 = s[0], X1 = a[0]). One frame of latency; width W is kept, the caller
// provides the headroom. Synchronous active-low reset clears the registers.
// The sums and differences are those of the split-radix equations the design
// follows; registering every layer is this implementation's choice.
module dht_addsub #(
  parameter int N = 32,
  parameter int W = 23
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic signed [W-1:0] x [N],
  output logic signed [W-1:0] s [N/2],
  output logic signed [W-1:0] a [N/2]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < N / 2; n++) begin
        s[n] <= '0;
        a[n] <= '0;
      end
    end else if (ce) begin
      for (int n = 0; n < N / 2; n++) begin
        s[n] <= x[n] + x[n+N/2];
        a[n] <= x[n] - x[n+N/2];
      end
    end
  end

endmodule
