// tb_shared_const_mul: checks the time-shared constant multiplier.
// Three instances: four operands on one multiplier (SHARE = 4), six operands
// on two multipliers (the second half used), and SHARE = 1 (a multiplier per
// operand, new operands every cycle). New random operands are applied right
// after each frame tick; after the next tick every output must equal
// round(x*C/2^16) of the operands of the frame before, i.e. one frame of
// latency, and must then hold for the whole frame.
module tb_shared_const_mul;

  localparam int W = 23, CW = 16, C = 54491;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] phase4;
  logic [0:0] phase1;
  logic tick4, tick1;
  assign tick4  = (phase4 == 2'd3);
  assign tick1  = 1'b1;
  assign phase1 = 1'b0;
  always_ff @(posedge clk) phase4 <= rst_n ? phase4 + 2'd1 : 2'd0;

  logic signed [W-1:0] xa [4], pa [4], xa_prev [4];
  logic signed [W-1:0] xb [6], pb [6], xb_prev [6];
  logic signed [W-1:0] xc [4], pc [4];
  int checks = 0, failures = 0;

  shared_const_mul #(.NIN(4), .SHARE(4), .W(W), .CW(CW), .COEF(C)) u_a (
    .clk, .rst_n, .ce(tick4), .phase(phase4), .x(xa), .p(pa));
  shared_const_mul #(.NIN(6), .SHARE(4), .W(W), .CW(CW), .COEF(C), .MUL_STYLE(1)) u_b (
    .clk, .rst_n, .ce(tick4), .phase(phase4), .x(xb), .p(pb));
  shared_const_mul #(.NIN(4), .SHARE(1), .W(W), .CW(CW), .COEF(C)) u_c (
    .clk, .rst_n, .ce(tick1), .phase(phase1), .x(xc), .p(pc));

  function automatic logic signed [W-1:0] rm(logic signed [W-1:0] v);
    return W'((longint'(v) * C + (longint'(1) << (CW - 1))) >>> CW);
  endfunction

  function automatic logic signed [W-1:0] rnd_op();
    return W'($signed(21'($urandom)));   // keep products within W bits
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int frames;
  initial begin
    for (int i = 0; i < 4; i++) begin xa[i] = 0; xc[i] = 0; xa_prev[i] = 0; end
    for (int i = 0; i < 6; i++) begin xb[i] = 0; xb_prev[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    frames = 0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(posedge clk); #1;
      // SHARE = 1 instance: checks every cycle
      if (cyc > 0)
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (pc[i] != rm(xc[i])) begin
            failures++; $display("ERROR: SHARE=1 p[%0d]=%0d expected %0d", i, pc[i], rm(xc[i]));
          end
        end
      for (int i = 0; i < 4; i++) xc[i] = rnd_op();
      // SHARE = 4 instances: outputs checked in every phase of a frame
      if (phase4 == 2'd0) begin      // a tick has just passed: next frame's operands
        frames++;
        for (int i = 0; i < 4; i++) begin xa_prev[i] = xa[i]; xa[i] = rnd_op(); end
        for (int i = 0; i < 6; i++) begin xb_prev[i] = xb[i]; xb[i] = rnd_op(); end
      end
      if (frames > 1) begin
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (pa[i] != rm(xa_prev[i])) begin
            failures++; $display("ERROR: 4x1 p[%0d]=%0d expected %0d", i, pa[i], rm(xa_prev[i]));
          end
        end
        for (int i = 0; i < 6; i++) begin
          checks++;
          if (pb[i] != rm(xb_prev[i])) begin
            failures++; $display("ERROR: 6x2 p[%0d]=%0d expected %0d", i, pb[i], rm(xb_prev[i]));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
