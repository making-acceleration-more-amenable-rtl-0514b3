// tb_dach_l2: the complete L2 cache task (core, FIFOs, memory interface) on
// the AXI memory model, two ports, 2-way LRU. Random loads and stores are
// checked against a reference memory at accept time; response latency must be
// one cycle after accept. A stop request must leave off-chip memory equal to
// the reference. Misses, write-back bursts and read bursts must all occur, and
// the burst counts must match the miss and write-back counts.
module tb_dach_l2;
  import dach_pkg::*;
  localparam int NP = 2, DW = 8, AW = 32, LWD = 16, BW = 8, LW = LWD*DW, BUS_W = BW*DW;
  localparam int MEMB = 2048, NREQ = 2000;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] rqv, rqr, rsv, afull;
  cache_op_e op [NP];
  logic [AW-1:0] addr [NP];
  logic [DW-1:0] wd [NP];
  logic [LW-1:0] rsl;
  logic awvalid, awready, wvalid, wready, wlast, bvalid, bready, arvalid, arready, rvalid, rready, rlast;
  logic [31:0] awaddr, araddr, hits, misses;
  logic [7:0] awlen, arlen;
  logic [BUS_W-1:0] wdata, rdata;
  logic [7:0] refm [MEMB];
  int checks = 0, failures = 0, issued = 0;
  logic [NP-1:0] exp_q;
  logic [LW-1:0] exp_line [NP];
  always #5 clk = ~clk;

  dach_l2 #(.NPORTS(NP), .DATA_W(DW), .ADDR_W(AW), .LINE_WORDS(LWD), .SETS(4), .WAYS(2),
            .REPL(REPL_LRU), .MAP(MAP_STANDARD), .BEAT_WORDS(BW)) dut (
    .clk, .rst_n, .rq_valid(rqv), .rq_ready(rqr), .rq_op(op), .rq_addr(addr), .rq_wdata(wd),
    .rs_valid(rsv), .rs_afull(afull), .rs_line(rsl),
    .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast, .bvalid, .bready,
    .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata, .rlast, .hits, .misses);

  axi_mem_model #(.BUS_W(BUS_W), .MEM_BYTES(MEMB), .LATENCY(5), .STALLS(1)) mem (
    .clk, .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast, .bvalid, .bready,
    .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata, .rlast);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (exp_q[p] != rsv[p] && !(rsv[p] && op[p] == OP_STOP)) failures++;
      else if (rsv[p] && op[p] == OP_LOAD) begin
        checks++;
        if (rsl != exp_line[p]) begin
          failures++;
          if (failures < 10) $display("FAIL line port %0d addr %0d", p, addr[p]);
        end
      end
    end
    exp_q = '0;
    for (int p = 0; p < NP; p++) if (rqv[p] && rqr[p]) begin
      if (op[p] == OP_STORE) refm[addr[p]] = wd[p];
      else if (op[p] == OP_LOAD) begin
        exp_q[p] = 1;
        for (int i = 0; i < LWD; i++) exp_line[p][8*i +: 8] = refm[(addr[p] & ~32'(LWD-1)) + i];
      end
      #0;
    end
  end

  logic [NP-1:0] acc;
  always @(posedge clk) acc <= rqv & rqr;

  initial begin
    exp_q = '0;
    for (int i = 0; i < MEMB; i++) begin refm[i] = 8'($urandom); mem.mem[i] = refm[i]; end
    rqv = '0; afull = '0;
    for (int p = 0; p < NP; p++) begin op[p] = OP_LOAD; addr[p] = 0; wd[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (issued < NREQ || |rqv) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        if (acc[p]) rqv[p] = 0;
        afull[p] = ($urandom_range(0, 7) == 0);
        if (!rqv[p] && issued < NREQ && $urandom_range(0, 2) != 0) begin
          rqv[p] = 1;
          op[p] = $urandom_range(0, 1) ? OP_STORE : OP_LOAD;
          addr[p] = $urandom_range(0, MEMB - 1);
          if ($urandom_range(0, 2) != 0) addr[p] = 32'((issued * 3) % MEMB);
          wd[p] = 8'($urandom);
          issued++;
        end
      end
    end
    @(negedge clk);
    afull = '0; op[0] = OP_STOP; rqv[0] = 1;
    do @(posedge clk); while (!rsv[0]);
    @(negedge clk); rqv[0] = 0;
    for (int i = 0; i < MEMB; i++) begin
      checks++;
      if (mem.mem[i] != refm[i]) begin
        failures++;
        if (failures < 10) $display("FAIL memory byte %0d", i);
      end
    end
    checks += 4;
    if (hits + misses != NREQ) failures++;
    if (misses == 0 || mem.rd_bursts != int'(misses)) failures++;
    if (mem.wr_bursts == 0) failures++;
    if (mem.errors != 0) failures++;
    $display("hits=%0d misses=%0d read bursts=%0d write bursts=%0d", hits, misses, mem.rd_bursts, mem.wr_bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
