// tb_dht_top: end-to-end test of the 32-point DHT engine.
//
// Three engines run side by side on the same clock: the default one
// (adder-network multipliers shared four ways), one with table-lookup
// multipliers, and one with SHARE = 1 (dedicated multipliers, a frame every
// cycle). Each is driven and checked by a dht_checker: 40 frames
// (impulse, constant, worst-case sign patterns, random), compared with a
// double-precision transform, with the latency checked in cycles.
// Mechanisms that must each occur at least once: back-to-back frames in
// flight, bubbles in the input stream, every multiplier phase, and both
// multiplier styles and sharing factors (one engine each).
module tb_dht_top;

  localparam int N = 32, DW = 16, W = 23, LAT = 7, NF = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;
  int ck [3], fl [3], bub [3], ovl [3], nph [3], merr [3];
  logic dn [3];

  // engine 0: defaults
  logic iv0, ir0, ov0; logic signed [DW-1:0] x0 [N]; logic signed [W-1:0] y0 [N]; logic [1:0] ph0;
  dht_top #(.N(N), .DW(DW), .SHARE(4), .MUL_STYLE(0)) u_dut0 (
    .clk, .rst_n, .in_valid(iv0), .in_ready(ir0), .x_in(x0), .out_valid(ov0), .y_out(y0), .phase(ph0));
  dht_checker #(.N(N), .DW(DW), .W(W), .SHARE(4), .LAT(LAT), .NFRAMES(NF)) u_chk0 (
    .clk, .in_valid(iv0), .in_ready(ir0 & rst_n), .x_in(x0), .out_valid(ov0), .y_out(y0),
    .phase(32'(ph0)), .checks(ck[0]), .failures(fl[0]), .n_bubbles(bub[0]), .n_overlap(ovl[0]),
    .n_phases(nph[0]), .max_err(merr[0]), .done(dn[0]));

  // engine 1: lookup-table multipliers
  logic iv1, ir1, ov1; logic signed [DW-1:0] x1 [N]; logic signed [W-1:0] y1 [N]; logic [1:0] ph1;
  dht_top #(.N(N), .DW(DW), .SHARE(4), .MUL_STYLE(1)) u_dut1 (
    .clk, .rst_n, .in_valid(iv1), .in_ready(ir1), .x_in(x1), .out_valid(ov1), .y_out(y1), .phase(ph1));
  dht_checker #(.N(N), .DW(DW), .W(W), .SHARE(4), .LAT(LAT), .NFRAMES(NF)) u_chk1 (
    .clk, .in_valid(iv1), .in_ready(ir1 & rst_n), .x_in(x1), .out_valid(ov1), .y_out(y1),
    .phase(32'(ph1)), .checks(ck[1]), .failures(fl[1]), .n_bubbles(bub[1]), .n_overlap(ovl[1]),
    .n_phases(nph[1]), .max_err(merr[1]), .done(dn[1]));

  // engine 2: no sharing, one frame per cycle
  logic iv2, ir2, ov2; logic signed [DW-1:0] x2 [N]; logic signed [W-1:0] y2 [N]; logic [0:0] ph2;
  dht_top #(.N(N), .DW(DW), .SHARE(1), .MUL_STYLE(0)) u_dut2 (
    .clk, .rst_n, .in_valid(iv2), .in_ready(ir2), .x_in(x2), .out_valid(ov2), .y_out(y2), .phase(ph2));
  dht_checker #(.N(N), .DW(DW), .W(W), .SHARE(1), .LAT(LAT), .NFRAMES(NF)) u_chk2 (
    .clk, .in_valid(iv2), .in_ready(ir2 & rst_n), .x_in(x2), .out_valid(ov2), .y_out(y2),
    .phase(32'(ph2)), .checks(ck[2]), .failures(fl[2]), .n_bubbles(bub[2]), .n_overlap(ovl[2]),
    .n_phases(nph[2]), .max_err(merr[2]), .done(dn[2]));

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 20000) begin
      $display("ERROR: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (dn[0] && dn[1] && dn[2]);
    @(posedge clk);
    checks = 0; failures = 0;
    for (int i = 0; i < 3; i++) begin
      checks += ck[i]; failures += fl[i];
      $display("engine %0d: checks=%0d failures=%0d bubbles=%0d overlapped=%0d phases=%0d max_err=%0d LSB",
               i, ck[i], fl[i], bub[i], ovl[i], nph[i], merr[i]);
      checks++;
      if (bub[i] == 0)  begin failures++; $display("ERROR: engine %0d saw no bubble", i); end
      checks++;
      if (ovl[i] == 0)  begin failures++; $display("ERROR: engine %0d never had frames overlapped", i); end
      checks++;
      if (nph[i] != ((i == 2) ? 1 : 4)) begin failures++; $display("ERROR: engine %0d phases %0d", i, nph[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
