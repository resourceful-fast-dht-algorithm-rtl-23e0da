// tb_phase_ctrl: checks the phase counter and frame tick for SHARE = 4
// (the two phase bits are clk/2 and clk/4 square waves), SHARE = 3 and
// SHARE = 1, against a counter kept by the testbench, after reset and
// after a second reset in mid-frame.
module tb_phase_ctrl;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] ph4, ph3;
  logic [0:0] ph1;
  logic t4, t3, t1;
  int checks = 0, failures = 0;
  int e4, e3, cyc;

  phase_ctrl #(.SHARE(4)) u4 (.clk, .rst_n, .phase(ph4), .tick(t4));
  phase_ctrl #(.SHARE(3)) u3 (.clk, .rst_n, .phase(ph3), .tick(t3));
  phase_ctrl #(.SHARE(1)) u1 (.clk, .rst_n, .phase(ph1), .tick(t1));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR: %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst_n = 1'b1;
    e4 = 0; e3 = 0;
    for (cyc = 0; cyc < 40; cyc++) begin
      if (cyc == 21) begin
        rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1; e4 = 0; e3 = 0;
      end
      chk(ph4 == 2'(e4), "SHARE=4 phase");
      chk(t4 == (e4 == 3), "SHARE=4 tick");
      chk(ph4[0] == (e4 % 2 == 1) && ph4[1] == (e4 >= 2), "SHARE=4 phase bits as clk/2, clk/4");
      chk(ph3 == 2'(e3), "SHARE=3 phase");
      chk(t3 == (e3 == 2), "SHARE=3 tick");
      chk(ph1 == 1'b0 && t1, "SHARE=1 tick every cycle");
      @(posedge clk); #1;
      e4 = (e4 + 1) % 4;
      e3 = (e3 + 1) % 3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
