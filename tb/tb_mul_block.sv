// tb_mul_block: checks the twiddle stage at N = 32 (seven multipliers shared
// four ways), N = 16 with table-lookup multipliers shared two ways, and
// N = 8 with SHARE = 1 (dedicated multipliers, new operands every cycle).
module tb_mul_block;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int ck [3], fl [3];
  logic dn [3];
  int checks, failures;

  mul_block_harness #(.N(32), .SHARE(4), .MUL_STYLE(0)) h0 (.clk, .rst_n, .checks(ck[0]), .failures(fl[0]), .done(dn[0]));
  mul_block_harness #(.N(16), .SHARE(2), .MUL_STYLE(1)) h1 (.clk, .rst_n, .checks(ck[1]), .failures(fl[1]), .done(dn[1]));
  mul_block_harness #(.N(8),  .SHARE(1), .MUL_STYLE(0)) h2 (.clk, .rst_n, .checks(ck[2]), .failures(fl[2]), .done(dn[2]));

  initial begin
    repeat (5000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ck[0] + ck[1] + ck[2], fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (dn[0] && dn[1] && dn[2]);
    checks = ck[0] + ck[1] + ck[2];
    failures = fl[0] + fl[1] + fl[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
