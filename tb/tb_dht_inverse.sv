// tb_dht_inverse: the Hartley transform is its own inverse,
// x(n) = (1/N) sum_k X(k) cas(2 pi n k/N), so the same engine serves both
// directions. Each of 12 random frames (amplitude below 2^14, so X/N fits
// the 16-bit input) is transformed, the result is divided by N = 32 with
// rounding and fed back through the same default engine; the second result
// must reproduce the original samples within 8 LSBs (rounding X/N to
// integers adds up to 1/2 LSB to each of the 32 values the second transform
// sums, about 2 LSB rms; the first pass adds a few LSB/N). A frame whose
// values would not fit the input width counts as a failure.
module tb_dht_inverse;

  localparam int N = 32, DW = 16, W = 23, FRAMES = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid;
  logic signed [DW-1:0] x_in [N];
  logic signed [W-1:0]  y_out [N];
  logic [1:0] phase;
  int checks = 0, failures = 0, round_trips = 0;
  int orig [N], mid [N];

  dht_top u_dut (.clk, .rst_n, .in_valid, .in_ready, .x_in, .out_valid, .y_out, .phase);

  initial begin
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // offer one frame at the next in_ready and wait for its transform
  task automatic transform(input int v [N], output int r [N]);
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_valid = 1'b1;
    for (int n = 0; n < N; n++) x_in[n] = DW'(v[n]);
    @(negedge clk);
    in_valid = 1'b0;
    while (!out_valid) @(negedge clk);
    for (int k = 0; k < N; k++) r[k] = y_out[k];
  endtask

  initial begin
    int fwd [N], back [N];
    in_valid = 1'b0;
    for (int n = 0; n < N; n++) x_in[n] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int n = 0; n < N; n++) orig[n] = $signed(15'($urandom));
      transform(orig, fwd);
      for (int k = 0; k < N; k++) begin
        mid[k] = (fwd[k] + N / 2) >>> $clog2(N);   // X(k)/N, rounded
        checks++;
        if (mid[k] > 32767 || mid[k] < -32768) begin
          failures++;
          $display("ERROR: X(%0d)/N = %0d does not fit the input", k, mid[k]);
        end
      end
      transform(mid, back);
      for (int n = 0; n < N; n++) begin
        int e;
        e = back[n] - orig[n];
        checks++;
        if (e > 8 || e < -8) begin
          failures++;
          $display("ERROR: frame %0d x(%0d) = %0d after forward and inverse, expected %0d", f, n, back[n], orig[n]);
        end
      end
      round_trips++;
    end
    checks++;
    if (round_trips != FRAMES) failures++;
    $display("round trips: %0d", round_trips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
