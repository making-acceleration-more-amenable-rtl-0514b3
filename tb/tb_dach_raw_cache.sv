// tb_dach_raw_cache: directed and random sequences against a model of a
// two-entry FIFO-replaced register cache: a lookup must hit exactly for the
// two most recent writes that were not invalidated, returning the newest data.
module tb_dach_raw_cache;
  localparam int IW = 4, LW = 32;
  logic clk = 0, rst_n = 0;
  logic [IW-1:0] ridx, widx, iidx;
  logic hit, we, ie;
  logic [LW-1:0] rline, wline;
  int checks = 0, failures = 0, hitsn = 0;
  // model: entries in write order
  logic        m_v [2];
  logic [IW-1:0] m_i [2];
  logic [LW-1:0] m_d [2];
  int m_p = 0;
  always #5 clk = ~clk;

  dach_raw_cache #(.IDX_W(IW), .LINE_W(LW), .LINES(2)) dut (.clk, .rst_n, .rd_idx(ridx), .rd_hit(hit),
    .rd_line(rline), .wr_en(we), .wr_idx(widx), .wr_line(wline), .inv_en(ie), .inv_idx(iidx));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_v[0] = 0; m_v[1] = 0; m_i[0] = 0; m_i[1] = 0; m_d[0] = 0; m_d[1] = 0;
    we = 0; ie = 0; ridx = 0; widx = 0; iidx = 0; wline = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); widx = IW'($urandom_range(0, 5)); wline = $urandom;
      ie = ($urandom_range(0, 9) == 0); iidx = IW'($urandom_range(0, 5));
      ridx = IW'($urandom_range(0, 5));
      #1;
      begin
        logic eh; logic [LW-1:0] ed; int newest;
        eh = 0; ed = 0;
        newest = (m_p + 1) % 2;          // entry written last
        if (m_v[m_p] && m_i[m_p] == ridx) begin eh = 1; ed = m_d[m_p]; end
        if (m_v[newest] && m_i[newest] == ridx) begin eh = 1; ed = m_d[newest]; end
        checks++;
        if (hit != eh || (eh && rline != ed)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d idx=%0d hit=%b exp %b", t, ridx, hit, eh);
        end
        if (hit) hitsn++;
      end
      @(posedge clk);
      if (ie) for (int i = 0; i < 2; i++) if (m_i[i] == iidx) m_v[i] = 0;
      if (we) begin m_v[m_p] = 1; m_i[m_p] = widx; m_d[m_p] = wline; m_p = (m_p + 1) % 2; end
    end
    checks++;
    if (hitsn == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
