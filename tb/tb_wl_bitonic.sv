// tb_wl_bitonic: bitonic sort of 32-bit integers in place through one
// read-write L2 cache task with 64-word lines and two ways, so that the lines
// of element i and element i+step can stay cached together. The array is
// reduced to 2048 elements and the cache to 8 sets. The testbench acts as the
// compute task: each compare-exchange loads a[i] and a[i^j], compares them and,
// if they are out of order, stores both swapped. A stop request then writes
// every dirty line back. Off-chip memory must hold the sorted input (same
// multiset, ascending), the hit rate must exceed 90 %, and write-backs and
// read-after-write bypasses must occur.
module tb_wl_bitonic;
  import dach_pkg::*;
  localparam int NE = 2048, DW = 32, LWD = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_raw = 0;

  logic rqv, rqr, rsv;
  cache_op_e op;
  logic [31:0] rqa, wd;
  logic [LWD*DW-1:0] line;
  logic [31:0] hits, misses;
  logic awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic arvalid, arready, rvalid, rready, rlast;
  logic [31:0] awaddr, araddr; logic [7:0] awlen, arlen;
  logic [63:0] wdata, rdata;
  logic [31:0] init [NE];

  dach_l2 #(.NPORTS(1), .DATA_W(DW), .ADDR_W(32), .LINE_WORDS(LWD), .SETS(8), .WAYS(2),
            .REPL(REPL_LRU), .MAP(MAP_STANDARD), .BEAT_WORDS(2)) dut (
    .clk, .rst_n, .rq_valid('{rqv}), .rq_ready('{rqr}), .rq_op('{op}), .rq_addr('{rqa}),
    .rq_wdata('{wd}), .rs_valid('{rsv}), .rs_afull(1'b0), .rs_line(line),
    .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast, .bvalid, .bready,
    .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata, .rlast, .hits, .misses);
  axi_mem_model #(.BUS_W(64), .MEM_BYTES(4 * NE), .LATENCY(8), .STALLS(1)) mem (
    .clk, .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast, .bvalid, .bready,
    .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata, .rlast);

  always @(posedge clk) if (dut.u_core.b_valid_q && dut.u_core.raw_hit) n_raw++;

  task automatic access(input cache_op_e o, input int addr, input logic [31:0] d, output logic [31:0] word);
    @(negedge clk);
    rqv = 1; op = o; rqa = addr; wd = d;
    do @(posedge clk); while (!rqr);
    @(negedge clk); rqv = 0;
    word = 0;
    if (o != OP_STORE) begin
      while (!rsv) @(negedge clk);
      word = line[(addr % LWD) * DW +: DW];
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [31:0] x, y, dummy;
    logic [31:0] sorted [NE];
    rqv = 0; op = OP_LOAD; rqa = 0; wd = 0;
    for (int i = 0; i < NE; i++) begin
      init[i] = $urandom;
      for (int k = 0; k < 4; k++) mem.mem[4*i + k] = init[i][8*k +: 8];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 2; k <= NE; k *= 2)
      for (int j = k / 2; j > 0; j /= 2)
        for (int i = 0; i < NE; i++) begin
          automatic int l = i ^ j;
          if (l > i) begin
            automatic bit up = ((i & k) == 0);
            access(OP_LOAD, i, 0, x);
            access(OP_LOAD, l, 0, y);
            if (up ? ($signed(x) > $signed(y)) : ($signed(x) < $signed(y))) begin
              access(OP_STORE, i, y, dummy);
              access(OP_STORE, l, x, dummy);
            end
          end
        end
    access(OP_STOP, 0, 0, dummy);
    repeat (4) @(posedge clk);
    // signed order = unsigned order with the sign bit flipped
    for (int i = 0; i < NE; i++) sorted[i] = init[i] ^ 32'h8000_0000;
    sorted.sort();
    for (int i = 0; i < NE; i++) sorted[i] ^= 32'h8000_0000;
    for (int i = 0; i < NE; i++) begin
      automatic logic [31:0] v;
      for (int k = 0; k < 4; k++) v[8*k +: 8] = mem.mem[4*i + k];
      checks++;
      if (v != sorted[i]) begin
        failures++;
        if (failures < 8) $display("FAIL a[%0d] = %0d, expected %0d", i, $signed(v), $signed(sorted[i]));
      end
    end
    checks += 3;
    if (hits * 10 < (hits + misses) * 9) failures++;
    if (mem.wr_bursts == 0) failures++;
    if (n_raw == 0) failures++;
    $display("hits %0d misses %0d write-back bursts %0d raw bypasses %0d", hits, misses, mem.wr_bursts, n_raw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
