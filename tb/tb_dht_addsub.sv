// tb_dht_addsub: checks the first add/subtract layer for N = 32 and N = 2.
// Random inputs change every cycle while ce is high on a random third of the
// cycles; after a cycle with ce the outputs must be x[n] +/- x[n+N/2] of the
// inputs of that cycle, and after a cycle without ce they must not change.
module tb_dht_addsub;

  localparam int W = 23;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] x32 [32], s32 [16], a32 [16], es [16], ea [16];
  logic signed [W-1:0] x2 [2], s2 [1], a2 [1], es2, ea2;
  int checks = 0, failures = 0;

  dht_addsub #(.N(32), .W(W)) u_32 (.clk, .rst_n, .ce, .x(x32), .s(s32), .a(a32));
  dht_addsub #(.N(2),  .W(W)) u_2  (.clk, .rst_n, .ce, .x(x2),  .s(s2),  .a(a2));

  initial begin
    repeat (5000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 32; n++) x32[n] = 0;
    x2[0] = 0; x2[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 16; n++) begin es[n] = 0; ea[n] = 0; end
    es2 = 0; ea2 = 0;
    for (int cyc = 0; cyc < 300; cyc++) begin
      ce = ($urandom_range(2, 0) == 0);
      for (int n = 0; n < 32; n++) x32[n] = W'($signed(22'($urandom)));
      x2[0] = W'($signed(22'($urandom)));
      x2[1] = W'($signed(22'($urandom)));
      if (ce) begin
        for (int n = 0; n < 16; n++) begin
          es[n] = x32[n] + x32[n+16];
          ea[n] = x32[n] - x32[n+16];
        end
        es2 = x2[0] + x2[1];
        ea2 = x2[0] - x2[1];
      end
      @(posedge clk); #1;
      for (int n = 0; n < 16; n++) begin
        checks += 2;
        if (s32[n] != es[n]) begin failures++; $display("ERROR: s[%0d]=%0d expected %0d", n, s32[n], es[n]); end
        if (a32[n] != ea[n]) begin failures++; $display("ERROR: a[%0d]=%0d expected %0d", n, a32[n], ea[n]); end
      end
      checks += 2;
      if (s2[0] != es2 || a2[0] != ea2) begin failures += 2; $display("ERROR: N=2 butterfly"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
