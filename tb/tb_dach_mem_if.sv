// tb_dach_mem_if: the memory-interface task against the AXI memory model.
// Random requests (read only, write-back only, write-back then read) are sent;
// each response line is compared with a reference copy of memory, and after
// each write-back the memory model must hold the line written. The burst
// count of the memory model and the time from request to response are checked
// against the number of beats per line.
module tb_dach_mem_if;
  localparam int DW = 8, LWD = 16, BW = 8, LA = 28, LINE_W = LWD*DW, BUS_W = BW*DW;
  localparam int MEMB = 1024;
  logic clk = 0, rst_n = 0;
  logic rqv, rqr, wb, rd, rsv, rsr;
  logic [LA-1:0] wbla, rdla;
  logic [LINE_W-1:0] wbl, rsl;
  logic awvalid, awready, wvalid, wready, wlast, bvalid, bready, arvalid, arready, rvalid, rready, rlast;
  logic [31:0] awaddr, araddr;
  logic [7:0] awlen, arlen;
  logic [BUS_W-1:0] wdata, rdata;
  logic [7:0] ref_mem [MEMB];
  int checks = 0, failures = 0, n_rd = 0, n_wb = 0;
  always #5 clk = ~clk;

  dach_mem_if #(.DATA_W(DW), .LINE_WORDS(LWD), .BEAT_WORDS(BW), .LADDR_W(LA), .AXI_ADDR_W(32)) dut (
    .clk, .rst_n, .rq_valid(rqv), .rq_ready(rqr), .rq_wb(wb), .rq_wb_laddr(wbla), .rq_wb_line(wbl),
    .rq_rd(rd), .rq_rd_laddr(rdla), .rs_valid(rsv), .rs_ready(rsr), .rs_line(rsl),
    .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast, .bvalid, .bready,
    .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata, .rlast);

  axi_mem_model #(.BUS_W(BUS_W), .MEM_BYTES(MEMB), .LATENCY(3), .STALLS(1)) mem (
    .clk, .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast, .bvalid, .bready,
    .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata, .rlast);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lines = MEMB / (LWD*DW/8);
    for (int i = 0; i < MEMB; i++) begin ref_mem[i] = 8'($urandom); mem.mem[i] = ref_mem[i]; end
    rqv = 0; wb = 0; rd = 0; wbla = 0; rdla = 0; wbl = 0; rsr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int kind, t0;
      kind = $urandom_range(0, 2);
      @(negedge clk);
      rqv = 1; wb = (kind != 0); rd = (kind != 1);
      wbla = LA'($urandom_range(0, lines - 1)); rdla = LA'($urandom_range(0, lines - 1));
      wbl = {4{$urandom}};
      do @(posedge clk); while (!rqr);
      t0 = $time;
      if (wb) begin
        for (int i = 0; i < LWD; i++) ref_mem[int'(wbla)*LWD + i] = wbl[8*i +: 8];
        n_wb++;
      end
      if (rd) n_rd++;
      @(negedge clk); rqv = 0;
      rsr = 1;
      do @(posedge clk); while (!rsv);
      checks++;
      if (($time - t0) / 10 < (wb ? LWD/BW + 2 : 0) + (rd ? LWD/BW + 3 : 0)) failures++;
      if (rd) begin
        for (int i = 0; i < LWD; i++) begin
          checks++;
          if (rsl[8*i +: 8] != ref_mem[int'(rdla)*LWD + i]) begin
            failures++;
            if (failures < 10) $display("FAIL read line %0d word %0d", rdla, i);
          end
        end
      end
      @(negedge clk); rsr = 0;
      if (wb) for (int i = 0; i < LWD; i++) begin
        checks++;
        if (mem.mem[int'(wbla)*LWD + i] != ref_mem[int'(wbla)*LWD + i]) failures++;
      end
    end
    checks += 2;
    if (mem.rd_bursts != n_rd || mem.wr_bursts != n_wb || mem.errors != 0) failures++;
    if (n_rd == 0 || n_wb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
