// tb_wl_rowread: the row-reading kernel used to compare cache designs: the
// A operand of C = A x B on 32-bit integers is read row by row, each row many
// times, through a direct-mapped read-only cache sized to hold exactly one row
// (lines x words per line = row length). Four line sizes are run side by side,
// 8, 16, 32 and 64 words with 128, 64, 32 and 16 lines. The matrix is reduced
// to 4 rows of 1024 words, each read 8 times instead of 1024. See
// tb_rowread_harness for the checks.
module tb_wl_rowread;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int c [4], f [4];
  logic d [4];

  tb_rowread_harness #(.LW(8),  .SETS(128)) h0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(d[0]));
  tb_rowread_harness #(.LW(16), .SETS(64))  h1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(d[1]));
  tb_rowread_harness #(.LW(32), .SETS(32))  h2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(d[2]));
  tb_rowread_harness #(.LW(64), .SETS(16))  h3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .finished(d[3]));

  function automatic void report(int extra);
    int checks = 0, failures = extra;
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
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
