// tb_dht_full: the DHT engine exactly as delivered (all parameters at their
// defaults: N = 32, 16-bit input, SHARE = 4, adder-network multipliers),
// taken through 24 complete transforms with the dht_checker scoreboard:
// values against a double-precision transform and a latency of 28 cycles.
module tb_dht_full;

  localparam int N = 32, DW = 16, W = 23;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid;
  logic signed [DW-1:0] x_in [N];
  logic signed [W-1:0]  y_out [N];
  logic [1:0] phase;
  int checks, failures, bub, ovl, nph, merr;
  logic done;

  dht_top u_dut (.clk, .rst_n, .in_valid, .in_ready, .x_in, .out_valid, .y_out, .phase);

  dht_checker #(.N(N), .DW(DW), .W(W), .SHARE(4), .LAT(7), .NFRAMES(24)) u_chk (
    .clk, .in_valid, .in_ready(in_ready & rst_n), .x_in, .out_valid, .y_out,
    .phase(32'(phase)), .checks, .failures, .n_bubbles(bub), .n_overlap(ovl),
    .n_phases(nph), .max_err(merr), .done);

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 10000) begin
      $display("ERROR: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done);
    $display("frames checked, max error %0d LSB, bubbles %0d", merr, bub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
