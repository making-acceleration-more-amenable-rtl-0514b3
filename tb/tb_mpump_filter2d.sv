// tb_mpump_filter2d: the multi-pumped filter task in four configurations: the
// double-pumped 15 x 15 task (113 multipliers), the triple-pumped one (75), the
// single-clock one (225), and a small 4-bit, 10-term task pumped 4 times, whose
// last slot uses only one of its three multipliers. See tb_f2d_harness for the
// checks.
module tb_mpump_filter2d;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int c [4], f [4];
  logic d [4];

  tb_f2d_harness #(.W(8), .N(225), .PUMP(2)) h0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(d[0]));
  tb_f2d_harness #(.W(8), .N(225), .PUMP(3)) h1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(d[1]));
  tb_f2d_harness #(.W(8), .N(225), .PUMP(1)) h2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(d[2]));
  tb_f2d_harness #(.W(4), .N(10),  .PUMP(4)) h3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .finished(d[3]));

  function automatic void report(int extra);
    int checks = 0, failures = extra;
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    #4000000;
    report(1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3]);
    report(0);
    $finish;
  end
endmodule
