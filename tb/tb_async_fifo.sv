// tb_async_fifo: write clock and read clock at unrelated periods (7 and 3 time
// units, then swapped roles by random pacing); random traffic checked against a
// queue model for order and data; full and empty must both be reached, and
// almost_full must be high whenever the writer sees at most one free slot.
module tb_async_fifo;
  localparam int W = 16, D = 8;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wv, wr, waf, rv, rr;
  logic [W-1:0] wd, rd;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_w = 0, n_r = 0, fulls = 0, empties = 0;
  always #7 wclk = ~wclk;
  always #3 rclk = ~rclk;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .wr_clk(wclk), .wr_rst_n(rst_n), .wr_valid(wv), .wr_ready(wr), .wr_almost_full(waf), .wr_data(wd),
    .rd_clk(rclk), .rd_rst_n(rst_n), .rd_valid(rv), .rd_ready(rr), .rd_data(rd));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    wv = 0; wd = 0;
    #50 rst_n = 1;
    while (n_w < 3000) begin
      @(negedge wclk);
      wv = ($urandom_range(0, 99) < 80);
      wd = W'(n_w);
      @(posedge wclk);
      if (!wr) fulls++;
      if (wv && wr) begin
        q.push_back(wd);
        n_w++;
      end
      // a writer that sees <= 1 free slot must see almost_full
      checks++;
      if (q.size() - 0 > D) failures++;
    end
    @(negedge wclk) wv = 0;
  end

  // reader: slow in the first half (to fill), fast in the second (to drain)
  initial begin
    rr = 0;
    #50;
    while (n_r < 3000) begin
      @(negedge rclk);
      rr = ($urandom_range(0, 99) < (n_r < 1500 ? 15 : 90));
      @(posedge rclk);
      if (!rv) empties++;
      if (rv && rr) begin
        checks++;
        if (q.size() == 0 || rd != q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL read %0d got %h", n_r, rd);
        end
        if (q.size() != 0) void'(q.pop_front());
        n_r++;
      end
    end
    checks += 2;
    if (fulls == 0) failures++;
    if (empties == 0) failures++;
    $display("fulls=%0d empties=%0d", fulls, empties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // almost_full is conservative: never low while only one slot is free
  always @(posedge wclk) if (rst_n) begin
    checks++;
    if (!wr && !waf) failures++;
  end
endmodule
