// tb_dach_core: three configurations of the cache core run at once: two ports
// with 2-way LRU and standard mapping; one port with 2-way FIFO replacement and
// swapped mapping; one port direct-mapped. See tb_core_harness for the checks.
module tb_dach_core;
  import dach_pkg::*;
  logic clk = 0, rst_n = 0;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  always #5 clk = ~clk;

  tb_core_harness #(.NPORTS(2), .SETS(4), .WAYS(2), .REPL(REPL_LRU),  .MAP(MAP_STANDARD)) h0 (.clk, .rst_n, .checks(c0), .failures(f0), .finished(d0));
  tb_core_harness #(.NPORTS(1), .SETS(8), .WAYS(2), .REPL(REPL_FIFO), .MAP(MAP_SWAPPED))  h1 (.clk, .rst_n, .checks(c1), .failures(f1), .finished(d1));
  tb_core_harness #(.NPORTS(1), .SETS(4), .WAYS(1), .REPL(REPL_LRU),  .MAP(MAP_STANDARD)) h2 (.clk, .rst_n, .checks(c2), .failures(f2), .finished(d2));

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
