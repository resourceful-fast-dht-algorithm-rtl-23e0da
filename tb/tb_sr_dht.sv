// tb_sr_dht: checks the recursive split-radix core at every length it is
// built from and with different sharing: N = 2, 4, 8 (no sharing), N = 16
// with table-lookup multipliers shared two ways, N = 32 shared four ways.
// Each harness checks the values and the latency of lat_of(N) frames.
module tb_sr_dht;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int ck [5], fl [5];
  logic dn [5];
  int checks, failures;

  sr_dht_harness #(.N(2),  .SHARE(1)) h0 (.clk, .rst_n, .checks(ck[0]), .failures(fl[0]), .done(dn[0]));
  sr_dht_harness #(.N(4),  .SHARE(1)) h1 (.clk, .rst_n, .checks(ck[1]), .failures(fl[1]), .done(dn[1]));
  sr_dht_harness #(.N(8),  .SHARE(1)) h2 (.clk, .rst_n, .checks(ck[2]), .failures(fl[2]), .done(dn[2]));
  sr_dht_harness #(.N(16), .SHARE(2), .MUL_STYLE(1)) h3 (.clk, .rst_n, .checks(ck[3]), .failures(fl[3]), .done(dn[3]));
  sr_dht_harness #(.N(32), .SHARE(4)) h4 (.clk, .rst_n, .checks(ck[4]), .failures(fl[4]), .done(dn[4]));

  function automatic int total(int v [5]);
    int t = 0;
    for (int i = 0; i < 5; i++) t += v[i];
    return t;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(ck), total(fl) + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4]);
    checks = total(ck);
    failures = total(fl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
