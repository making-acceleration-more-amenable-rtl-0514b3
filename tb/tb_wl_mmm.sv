// tb_wl_mmm: matrix multiplication C = A x B on 32-bit integers through two L2
// cache tasks in the configurations used for this kernel: A behind a
// direct-mapped cache of 8 sets with 16-word lines (one whole row of A, reused
// for every column of B), B behind a direct-mapped cache of 128 sets with
// 32-word lines and swapped address mapping, so that walking down a column of
// the row-major B visits a different set per row. The matrices are reduced to
// N = 4 rows and P = 64 columns (M = 128, as in the full-size kernel), and the
// B cache's address width is that of the B array, so the set bits select the
// row. The testbench acts as the compute task: for each C element it loads
// A[i][k] and B[k][j] for k = 0..M-1 and accumulates. C is compared with a
// reference product and the hit rates of both caches must exceed 90 %. Then the
// same column walk over B is replayed on a cache with standard mapping, whose
// hit rate must be lower than the swapped cache's.
module tb_wl_mmm;
  import dach_pkg::*;
  localparam int N = 4, M = 128, P = 64, DW = 32;
  localparam int A_AW = $clog2(N * M), B_AW = $clog2(M * P);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // cache port signals, index 0 = A, 1 = B (swapped), 2 = B (standard)
  logic [2:0] rqv, rqr, rsv;
  logic [31:0] rqa [3];
  logic [31:0] hits [3], misses [3];
  logic [16*DW-1:0] a_line;
  logic [32*DW-1:0] b_line, s_line;
  logic [31:0] a_mem [N*M];
  logic [31:0] b_mem [M*P];

  `define AXI_WIRES(p) \
    logic p``awvalid, p``awready, p``wvalid, p``wready, p``wlast, p``bvalid, p``bready; \
    logic p``arvalid, p``arready, p``rvalid, p``rready, p``rlast; \
    logic [31:0] p``awaddr, p``araddr; logic [7:0] p``awlen, p``arlen; \
    logic [63:0] p``wdata, p``rdata;
  `AXI_WIRES(xa_)
  `AXI_WIRES(xb_)
  `AXI_WIRES(xs_)
  `define AXI_CONN(p) \
    .awvalid(p``awvalid), .awready(p``awready), .awaddr(p``awaddr), .awlen(p``awlen), \
    .wvalid(p``wvalid), .wready(p``wready), .wdata(p``wdata), .wlast(p``wlast), \
    .bvalid(p``bvalid), .bready(p``bready), .arvalid(p``arvalid), .arready(p``arready), \
    .araddr(p``araddr), .arlen(p``arlen), .rvalid(p``rvalid), .rready(p``rready), \
    .rdata(p``rdata), .rlast(p``rlast)

  cache_op_e op_ld [1];
  logic [DW-1:0] wd0 [1];
  assign op_ld[0] = OP_LOAD;
  assign wd0[0] = '0;

  dach_l2 #(.NPORTS(1), .DATA_W(DW), .ADDR_W(A_AW), .LINE_WORDS(16), .SETS(8), .WAYS(1),
            .REPL(REPL_LRU), .MAP(MAP_STANDARD), .BEAT_WORDS(2)) u_a (
    .clk, .rst_n, .rq_valid(rqv[0]), .rq_ready(rqr[0]), .rq_op(op_ld), .rq_addr('{A_AW'(rqa[0])}),
    .rq_wdata(wd0), .rs_valid(rsv[0]), .rs_afull(1'b0), .rs_line(a_line), `AXI_CONN(xa_),
    .hits(hits[0]), .misses(misses[0]));
  dach_l2 #(.NPORTS(1), .DATA_W(DW), .ADDR_W(B_AW), .LINE_WORDS(32), .SETS(128), .WAYS(1),
            .REPL(REPL_LRU), .MAP(MAP_SWAPPED), .BEAT_WORDS(2)) u_b (
    .clk, .rst_n, .rq_valid(rqv[1]), .rq_ready(rqr[1]), .rq_op(op_ld), .rq_addr('{B_AW'(rqa[1])}),
    .rq_wdata(wd0), .rs_valid(rsv[1]), .rs_afull(1'b0), .rs_line(b_line), `AXI_CONN(xb_),
    .hits(hits[1]), .misses(misses[1]));
  dach_l2 #(.NPORTS(1), .DATA_W(DW), .ADDR_W(B_AW), .LINE_WORDS(32), .SETS(128), .WAYS(1),
            .REPL(REPL_LRU), .MAP(MAP_STANDARD), .BEAT_WORDS(2)) u_s (
    .clk, .rst_n, .rq_valid(rqv[2]), .rq_ready(rqr[2]), .rq_op(op_ld), .rq_addr('{B_AW'(rqa[2])}),
    .rq_wdata(wd0), .rs_valid(rsv[2]), .rs_afull(1'b0), .rs_line(s_line), `AXI_CONN(xs_),
    .hits(hits[2]), .misses(misses[2]));

  axi_mem_model #(.BUS_W(64), .MEM_BYTES(4 * N * M), .LATENCY(8), .STALLS(1)) m_a (.clk, `AXI_CONN(xa_));
  axi_mem_model #(.BUS_W(64), .MEM_BYTES(4 * M * P), .LATENCY(8), .STALLS(1)) m_b (.clk, `AXI_CONN(xb_));
  axi_mem_model #(.BUS_W(64), .MEM_BYTES(4 * M * P), .LATENCY(8), .STALLS(1)) m_s (.clk, `AXI_CONN(xs_));

  // one blocking load on port c; returns the addressed word of the line
  task automatic load(input int c, input int addr, input int lw, output logic [31:0] word);
    @(negedge clk);
    rqv[c] = 1; rqa[c] = addr;
    do @(posedge clk); while (!rqr[c]);
    @(negedge clk); rqv[c] = 0;
    while (!rsv[c]) @(negedge clk);
    case (c)
      0: word = a_line[(addr % lw) * DW +: DW];
      1: word = b_line[(addr % lw) * DW +: DW];
      default: word = s_line[(addr % lw) * DW +: DW];
    endcase
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [31:0] x, y, acc, ref_acc;
    rqv = '0;
    for (int c = 0; c < 3; c++) rqa[c] = 0;
    for (int i = 0; i < N * M; i++) begin
      a_mem[i] = $urandom_range(0, 1000) - 500;
      for (int k = 0; k < 4; k++) m_a.mem[4*i + k] = a_mem[i][8*k +: 8];
    end
    for (int i = 0; i < M * P; i++) begin
      b_mem[i] = $urandom_range(0, 1000) - 500;
      for (int k = 0; k < 4; k++) begin
        m_b.mem[4*i + k] = b_mem[i][8*k +: 8];
        m_s.mem[4*i + k] = b_mem[i][8*k +: 8];
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < P; j++) begin
        acc = 0; ref_acc = 0;
        for (int k = 0; k < M; k++) begin
          load(0, i * M + k, 16, x);
          load(1, k * P + j, 32, y);
          checks += 2;
          if (x != a_mem[i * M + k]) failures++;
          if (y != b_mem[k * P + j]) failures++;
          acc += x * y;
          ref_acc += a_mem[i * M + k] * b_mem[k * P + j];
        end
        checks++;
        if (acc != ref_acc) failures++;
      end
    // the same column walk over B with standard mapping
    for (int j = 0; j < P; j++)
      for (int k = 0; k < M; k++) begin
        load(2, k * P + j, 32, y);
        checks++;
        if (y != b_mem[k * P + j]) failures++;
      end
    checks += 3;
    if (hits[0] * 10 < (hits[0] + misses[0]) * 9) failures++;
    if (hits[1] * 10 < (hits[1] + misses[1]) * 9) failures++;
    if (hits[2] * (hits[1] + misses[1]) >= hits[1] * (hits[2] + misses[2])) failures++;
    $display("A cache hits %0d misses %0d; B swapped hits %0d misses %0d; B standard hits %0d misses %0d",
             hits[0], misses[0], hits[1], misses[1], hits[2], misses[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
