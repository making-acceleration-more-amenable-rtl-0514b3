// tb_sync_fifo: random pushes and pops against a queue model; checks order,
// data, the full/empty handshakes, count and almost_full.
module tb_sync_fifo;
  localparam int W = 12, D = 4;
  logic clk = 0, rst_n = 0;
  logic wv, wr, rv, rr, af;
  logic [W-1:0] wd, rd;
  logic [$clog2(D):0] cnt;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, fulls = 0;
  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_valid(wv), .wr_ready(wr), .wr_data(wd),
    .rd_valid(rv), .rd_ready(rr), .rd_data(rd), .almost_full(af), .count(cnt));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wv = 0; rr = 0; wd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      wv = ($urandom_range(0, 99) < (t < 2500 ? 70 : 30));
      wd = W'($urandom);
      rr = ($urandom_range(0, 99) < (t < 2500 ? 30 : 70));
      #1;
      checks++;
      if (rv != (q.size() != 0) || wr != (q.size() < D) || int'(cnt) != q.size() ||
          af != (q.size() >= D - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL flags t=%0d size=%0d rv=%b wr=%b cnt=%0d", t, q.size(), rv, wr, cnt);
      end
      if (rv && q.size() != 0) begin
        checks++;
        if (rd != q[0]) failures++;
      end
      if (!wr) fulls++;
      @(posedge clk);
      if (rv && rr) void'(q.pop_front());
      if (wv && wr) q.push_back(wd);
    end
    checks++;
    if (fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
