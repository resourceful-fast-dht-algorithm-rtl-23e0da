// tb_sr_preadd: checks the odd-branch pre-adder for N = 32 and N = 4.
// With A_n = a[n], B_n = a[n+N/4] and M = N/4 the expected values are
// u1 = A_n + A_{M-n}, v1 = B_n - B_{M-n}, u3 = A_n - A_{M-n},
// v3 = B_n + B_{M-n} for n >= 1, and u1[0] = a[0] + a[M],
// u3[0] = a[0] - a[M]. Registers must load only on ce.
module tb_sr_preadd;

  localparam int W = 23;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] a32 [16], u1 [8], v1 [8], u3 [8], v3 [8];
  logic signed [W-1:0] e1 [8], f1 [8], e3 [8], f3 [8];
  logic signed [W-1:0] a4 [2], w1 [1], x1 [1], w3 [1], x3 [1], g1, g3;
  int checks = 0, failures = 0;

  sr_preadd #(.N(32), .W(W)) u_32 (.clk, .rst_n, .ce, .a(a32), .u1, .v1, .u3, .v3);
  sr_preadd #(.N(4),  .W(W)) u_4  (.clk, .rst_n, .ce, .a(a4), .u1(w1), .v1(x1), .u3(w3), .v3(x3));

  task automatic chk(logic signed [W-1:0] got, logic signed [W-1:0] exp, string what, int n);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR: %s[%0d] = %0d, expected %0d", what, n, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16; n++) a32[n] = 0;
    a4[0] = 0; a4[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 8; n++) begin e1[n] = 0; f1[n] = 0; e3[n] = 0; f3[n] = 0; end
    g1 = 0; g3 = 0;
    for (int cyc = 0; cyc < 300; cyc++) begin
      ce = ($urandom_range(1, 0) == 0);
      for (int n = 0; n < 16; n++) a32[n] = W'($signed(21'($urandom)));
      a4[0] = W'($signed(21'($urandom)));
      a4[1] = W'($signed(21'($urandom)));
      if (ce) begin
        e1[0] = a32[0] + a32[8];
        e3[0] = a32[0] - a32[8];
        for (int n = 1; n < 8; n++) begin
          e1[n] = a32[n] + a32[8-n];
          f1[n] = a32[n+8] - a32[16-n];
          e3[n] = a32[n] - a32[8-n];
          f3[n] = a32[n+8] + a32[16-n];
        end
        g1 = a4[0] + a4[1];
        g3 = a4[0] - a4[1];
      end
      @(posedge clk); #1;
      chk(u1[0], e1[0], "u1", 0);
      chk(u3[0], e3[0], "u3", 0);
      for (int n = 1; n < 8; n++) begin
        chk(u1[n], e1[n], "u1", n);
        chk(v1[n], f1[n], "v1", n);
        chk(u3[n], e3[n], "u3", n);
        chk(v3[n], f3[n], "v3", n);
      end
      chk(w1[0], g1, "N=4 u1", 0);
      chk(w3[0], g3, "N=4 u3", 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
