// tb_core_harness: one randomised run of dach_core with a given configuration,
// for tb_dach_core. A behavioural memory task answers the core's line requests
// after random delays. Ports issue random loads and stores with locality;
// every load response must arrive exactly one cycle after its request was
// accepted and hold the line as a reference memory has it at that moment.
// Finally a stop request must flush every dirty line, after which the memory
// task's array must equal the reference. Counts hits, misses, write-backs,
// RAW-cache bypasses and back-to-back accepts; each must happen.
module tb_core_harness
  import dach_pkg::*;
#(
  parameter int NPORTS = 2,
  parameter int SETS = 4,
  parameter int WAYS = 2,
  parameter repl_e REPL = REPL_LRU,
  parameter addr_map_e MAP = MAP_STANDARD,
  parameter int NREQ = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int DW = 8, AW = 12, LWD = 8, LW = LWD*DW, LA = AW - 3;
  localparam int WORDS = 1 << AW;   // 4096 words of memory

  logic [NPORTS-1:0] rqv, rqr, rsv, afull;
  cache_op_e   op [NPORTS];
  logic [AW-1:0] addr [NPORTS];
  logic [DW-1:0] wd [NPORTS];
  logic [LW-1:0] rsl;
  logic mqv, mqr, mwb, mrd, msv, msr;
  logic [LA-1:0] mwbla, mrdla;
  logic [LW-1:0] mwbl, msl;
  logic [31:0] hits, misses;

  dach_core #(.NPORTS(NPORTS), .DATA_W(DW), .ADDR_W(AW), .LINE_WORDS(LWD), .SETS(SETS), .WAYS(WAYS),
              .REPL(REPL), .MAP(MAP)) dut (
    .clk, .rst_n, .rq_valid(rqv), .rq_ready(rqr), .rq_op(op), .rq_addr(addr), .rq_wdata(wd),
    .rs_valid(rsv), .rs_afull(afull), .rs_line(rsl),
    .mem_rq_valid(mqv), .mem_rq_ready(mqr), .mem_rq_wb(mwb), .mem_rq_wb_laddr(mwbla),
    .mem_rq_wb_line(mwbl), .mem_rq_rd(mrd), .mem_rq_rd_laddr(mrdla),
    .mem_rs_valid(msv), .mem_rs_ready(msr), .mem_rs_line(msl), .hits, .misses);

  logic [DW-1:0] refm [WORDS];
  logic [DW-1:0] lmem [WORDS];
  int n_wb = 0, n_raw = 0, n_b2b = 0, n_stall = 0;

  // ---------------- behavioural memory task
  initial begin
    mqr = 0; msv = 0; msl = '0;
    forever begin
      @(posedge clk);
      if (mqv && rst_n) begin
        logic w, r; logic [LA-1:0] wla, rla; logic [LW-1:0] wl;
        repeat ($urandom_range(0, 3)) @(posedge clk);
        @(negedge clk) mqr = 1;
        @(posedge clk);
        w = mwb; r = mrd; wla = mwbla; rla = mrdla; wl = mwbl;
        @(negedge clk) mqr = 0;
        if (w) begin
          n_wb++;
          for (int i = 0; i < LWD; i++) lmem[int'(wla)*LWD + i] = wl[8*i +: 8];
        end
        repeat ($urandom_range(2, 8)) @(posedge clk);
        @(negedge clk);
        msv = 1;
        for (int i = 0; i < LWD; i++) msl[8*i +: 8] = r ? lmem[int'(rla)*LWD + i] : 8'h00;
        do @(posedge clk); while (!msr);
        @(negedge clk) msv = 0;
      end
    end
  end

  // ---------------- checking of responses: one cycle after accept
  logic [NPORTS-1:0] exp_q;
  logic [LW-1:0]     exp_line [NPORTS];
  int issued = 0, sent = 0;
  logic [NPORTS-1:0] acc_prev;

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (exp_q[p] != rsv[p] && !(rsv[p] && op[p] == OP_STOP)) begin
        failures++;
        if (failures < 10) $display("FAIL response timing port %0d exp %b got %b", p, exp_q[p], rsv[p]);
      end else if (rsv[p] && op[p] != OP_STOP) begin
        checks++;
        if (rsl != exp_line[p]) begin
          failures++;
          if (failures < 10) $display("FAIL line port %0d", p);
        end
      end
    end
    if (dut.b_valid_q && dut.raw_hit) n_raw++;
    if (|acc_prev && |(rqr & rqv)) n_b2b++;
    if (|rqv && !(|rqr)) n_stall++;
    acc_prev = rqr & rqv;
    exp_q = '0;
    for (int p = 0; p < NPORTS; p++) begin
      if (rqv[p] && rqr[p]) begin
        logic [AW-1:0] base;
        base = addr[p] & ~AW'(LWD - 1);
        if (op[p] == OP_STORE) refm[addr[p]] = wd[p];
        else if (op[p] == OP_LOAD) begin
          exp_q[p] = 1;
          for (int i = 0; i < LWD; i++) exp_line[p][8*i +: 8] = refm[base + i];
        end
      end
    end
  end

  // ---------------- request drivers
  logic [AW-1:0] win;
  initial begin
    checks = 0; failures = 0; finished = 0; exp_q = '0; acc_prev = '0; win = 0;
    for (int i = 0; i < WORDS; i++) begin refm[i] = 8'($urandom); lmem[i] = refm[i]; end
    rqv = '0; afull = '0;
    for (int p = 0; p < NPORTS; p++) begin op[p] = OP_LOAD; addr[p] = 0; wd[p] = 0; end
    @(posedge rst_n);
    while (issued < NREQ) begin
      @(negedge clk);
      for (int p = 0; p < NPORTS; p++) begin
        afull[p] = ($urandom_range(0, 9) == 0);
        if (!rqv[p] && issued < NREQ && $urandom_range(0, 3) != 0) begin
          if ($urandom_range(0, 49) == 0) win = AW'($urandom);
          rqv[p]  = 1;
          op[p]   = $urandom_range(0, 1) ? OP_STORE : OP_LOAD;
          // mostly within a 64-word window, sometimes a column-like stride
          addr[p] = ($urandom_range(0, 4) == 0) ? AW'(win + 64 * $urandom_range(0, 15))
                                                : AW'(win + $urandom_range(0, 63));
          wd[p]   = 8'($urandom);
          issued++;
        end
      end
      @(posedge clk);
    end
    // let outstanding requests drain
    while (|rqv) @(posedge clk);
    // stop: flush
    @(negedge clk);
    afull = '0;
    op[0] = OP_STOP; rqv[0] = 1;
    do @(posedge clk); while (!rsv[0]);
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      checks++;
      if (lmem[i] != refm[i]) begin
        failures++;
        if (failures < 10) $display("FAIL memory word %0d after stop: %h exp %h", i, lmem[i], refm[i]);
      end
    end
    checks += 5;
    if (hits == 0 || misses == 0) failures++;
    if (n_wb == 0) failures++;
    if (n_raw == 0) failures++;
    if (n_b2b == 0) failures++;
    if (n_stall == 0) failures++;
    $display("core NPORTS=%0d SETS=%0d WAYS=%0d REPL=%0d MAP=%0d: hits=%0d misses=%0d writebacks=%0d raw_bypass=%0d back_to_back=%0d",
             NPORTS, SETS, WAYS, REPL, MAP, hits, misses, n_wb, n_raw, n_b2b);
    finished = 1;
  end

  // drop a request once accepted
  always @(posedge clk) begin
    #2;
    for (int p = 0; p < NPORTS; p++) if (rqv[p] && acc_prev[p]) rqv[p] = 0;
  end
endmodule
