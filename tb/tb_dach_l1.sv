// tb_dach_l1: three configurations of the private L1 run at once: the
// default (4 sets, direct mapped, same line as the L2); 2 sets of 4 ways with
// 8-word lines under a 32-word L2 line; 8 sets of 2 ways with 16-word lines
// under a 64-word L2 line. See tb_l1_harness for the checks.
module tb_dach_l1;
  logic clk = 0, rst_n = 0;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  always #5 clk = ~clk;

  tb_l1_harness #(.SETS(4), .WAYS(1), .LWD(16), .L2LWD(16)) h0 (.clk, .rst_n, .checks(c0), .failures(f0), .finished(d0));
  tb_l1_harness #(.SETS(2), .WAYS(4), .LWD(8),  .L2LWD(32)) h1 (.clk, .rst_n, .checks(c1), .failures(f1), .finished(d1));
  tb_l1_harness #(.SETS(8), .WAYS(2), .LWD(16), .L2LWD(64)) h2 (.clk, .rst_n, .checks(c2), .failures(f2), .finished(d2));

  initial begin
    repeat (300000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule
