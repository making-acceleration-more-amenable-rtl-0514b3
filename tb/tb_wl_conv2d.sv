// tb_wl_conv2d: 2D convolution B = A * K of an 8-bit image with a 15 x 15
// kernel, reading A through one L2 cache task configured as a line buffer:
// 15 ways (one per kernel row), 2 sets (so windows that straddle a line
// boundary are not evicted) and 64-word lines. The image is reduced to 20 rows
// of 128 pixels. The testbench acts as the compute task: for each output pixel
// it loads the 225 window pixels through the cache and accumulates the
// products with K, which it holds in registers. Every output is compared with
// a reference convolution and the hit rate must exceed 95 %.
// A second run uses the same cache with 15 ports, one per kernel row, as a
// 15-way tiled compute task would: 15 processes walk all windows in parallel,
// each summing its row's products; the row sums must add up to the reference,
// the hit rate must exceed 95 %, and the run must take fewer cycles than the
// single-port one, since the ports share the one-access-per-cycle pipeline.
module tb_wl_conv2d;
  import dach_pkg::*;
  localparam int ROWS = 20, COLS = 128, KP = 15, DW = 8, LWD = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rqv, rqr, rsv;
  logic [31:0] rqa;
  logic [LWD*DW-1:0] line;
  logic [31:0] hits, misses;
  logic awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic arvalid, arready, rvalid, rready, rlast;
  logic [31:0] awaddr, araddr; logic [7:0] awlen, arlen;
  logic [63:0] wdata, rdata;
  logic [7:0] img [ROWS*COLS];
  logic [7:0] kern [KP*KP];
  localparam int NWIN = (ROWS - KP + 1) * (COLS - KP + 1);

  // 15-port instance
  logic [KP-1:0] mrqv, mrqr, mrsv;
  logic [31:0] mrqa [KP];
  cache_op_e mop [KP];
  logic [7:0] mwd [KP];
  logic [LWD*DW-1:0] mline;
  logic [31:0] mhits, mmisses;
  logic mawvalid, mawready, mwvalid, mwready, mwlast, mbvalid, mbready;
  logic marvalid, marready, mrvalid, mrready, mrlast;
  logic [31:0] mawaddr, maraddr; logic [7:0] mawlen, marlen;
  logic [63:0] mwdata, mrdata;
  int part [KP][NWIN];
  int cyc = 0, t0, t_single, t_multi;
  always @(posedge clk) cyc <= cyc + 1;

  dach_l2 #(.NPORTS(KP), .DATA_W(DW), .ADDR_W(32), .LINE_WORDS(LWD), .SETS(2), .WAYS(KP),
            .REPL(REPL_LRU), .MAP(MAP_STANDARD), .BEAT_WORDS(8)) dutm (
    .clk, .rst_n, .rq_valid(mrqv), .rq_ready(mrqr), .rq_op(mop), .rq_addr(mrqa),
    .rq_wdata(mwd), .rs_valid(mrsv), .rs_afull('0), .rs_line(mline),
    .awvalid(mawvalid), .awready(mawready), .awaddr(mawaddr), .awlen(mawlen),
    .wvalid(mwvalid), .wready(mwready), .wdata(mwdata), .wlast(mwlast),
    .bvalid(mbvalid), .bready(mbready), .arvalid(marvalid), .arready(marready),
    .araddr(maraddr), .arlen(marlen), .rvalid(mrvalid), .rready(mrready),
    .rdata(mrdata), .rlast(mrlast), .hits(mhits), .misses(mmisses));
  axi_mem_model #(.BUS_W(64), .MEM_BYTES(ROWS * COLS), .LATENCY(8), .STALLS(1)) memm (
    .clk, .awvalid(mawvalid), .awready(mawready), .awaddr(mawaddr), .awlen(mawlen),
    .wvalid(mwvalid), .wready(mwready), .wdata(mwdata), .wlast(mwlast),
    .bvalid(mbvalid), .bready(mbready), .arvalid(marvalid), .arready(marready),
    .araddr(maraddr), .arlen(marlen), .rvalid(mrvalid), .rready(mrready),
    .rdata(mrdata), .rlast(mrlast));

  task automatic mload(input int pt, input int addr, output logic [7:0] px);
    @(negedge clk);
    mrqv[pt] = 1; mrqa[pt] = addr;
    do @(posedge clk); while (!mrqr[pt]);
    @(negedge clk); mrqv[pt] = 0;
    while (!mrsv[pt]) @(negedge clk);
    px = mline[(addr % LWD) * DW +: DW];
  endtask

  task automatic row_walker(input int p);
    logic [7:0] px;
    int w = 0;
    for (int r = 0; r + KP <= ROWS; r++)
      for (int c = 0; c + KP <= COLS; c++) begin
        part[p][w] = 0;
        for (int q = 0; q < KP; q++) begin
          mload(p, (r + p) * COLS + c + q, px);
          part[p][w] += int'(px) * int'(kern[p * KP + q]);
        end
        w++;
      end
  endtask

  dach_l2 #(.NPORTS(1), .DATA_W(DW), .ADDR_W(32), .LINE_WORDS(LWD), .SETS(2), .WAYS(KP),
            .REPL(REPL_LRU), .MAP(MAP_STANDARD), .BEAT_WORDS(8)) dut (
    .clk, .rst_n, .rq_valid('{rqv}), .rq_ready('{rqr}), .rq_op('{OP_LOAD}), .rq_addr('{rqa}),
    .rq_wdata('{8'd0}), .rs_valid('{rsv}), .rs_afull(1'b0), .rs_line(line),
    .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast, .bvalid, .bready,
    .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata, .rlast, .hits, .misses);
  axi_mem_model #(.BUS_W(64), .MEM_BYTES(ROWS * COLS), .LATENCY(8), .STALLS(1)) mem (
    .clk, .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast, .bvalid, .bready,
    .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata, .rlast);

  task automatic load(input int addr, output logic [7:0] px);
    @(negedge clk);
    rqv = 1; rqa = addr;
    do @(posedge clk); while (!rqr);
    @(negedge clk); rqv = 0;
    while (!rsv) @(negedge clk);
    px = line[(addr % LWD) * DW +: DW];
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [7:0] px;
    int acc, ref_acc;
    rqv = 0; rqa = 0; mrqv = '0;
    for (int i = 0; i < KP; i++) begin mrqa[i] = 0; mop[i] = OP_LOAD; mwd[i] = 0; end
    for (int i = 0; i < ROWS * COLS; i++) begin
      img[i] = 8'($urandom); mem.mem[i] = img[i]; memm.mem[i] = img[i];
    end
    for (int i = 0; i < KP * KP; i++) kern[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = cyc;
    for (int r = 0; r + KP <= ROWS; r++)
      for (int c = 0; c + KP <= COLS; c++) begin
        acc = 0; ref_acc = 0;
        for (int p = 0; p < KP; p++)
          for (int q = 0; q < KP; q++) begin
            load((r + p) * COLS + c + q, px);
            acc += int'(px) * int'(kern[p * KP + q]);
            ref_acc += int'(img[(r + p) * COLS + c + q]) * int'(kern[p * KP + q]);
          end
        checks++;
        if (acc != ref_acc) begin
          failures++;
          if (failures < 8) $display("FAIL B[%0d][%0d] = %0d, expected %0d", r, c, acc, ref_acc);
        end
      end
    t_single = cyc - t0;
    checks++;
    if (hits * 20 < (hits + misses) * 19) failures++;
    $display("single port: hits %0d misses %0d, %0d cycles", hits, misses, t_single);
    // 15 ports, one kernel row each
    t0 = cyc;
    for (int p = 0; p < KP; p++) fork
      automatic int pp = p;
      row_walker(pp);
    join_none
    wait fork;
    t_multi = cyc - t0;
    begin
      int w = 0;
      for (int r = 0; r + KP <= ROWS; r++)
        for (int c = 0; c + KP <= COLS; c++) begin
          int sum, ref_acc;
          sum = 0; ref_acc = 0;
          for (int p = 0; p < KP; p++) begin
            sum += part[p][w];
            for (int q = 0; q < KP; q++)
              ref_acc += int'(img[(r + p) * COLS + c + q]) * int'(kern[p * KP + q]);
          end
          checks++;
          if (sum != ref_acc) begin
            failures++;
            if (failures < 8) $display("FAIL 15-port B[%0d][%0d] = %0d, expected %0d", r, c, sum, ref_acc);
          end
          w++;
        end
    end
    checks += 2;
    if (mhits * 20 < (mhits + mmisses) * 19) failures++;
    if (t_multi >= t_single) failures++;
    $display("15 ports: hits %0d misses %0d, %0d cycles", mhits, mmisses, t_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
