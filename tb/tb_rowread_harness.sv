// tb_rowread_harness: one configuration of the row-reading workload. A
// direct-mapped read-only L2 cache task of SETS lines of LW 32-bit words
// (SETS * LW = COLS, so one whole row fits) sits in front of an AXI memory
// model holding a ROWS x COLS matrix. The harness reads each row REP times in
// order, as the A operand of a matrix product is read, and checks every word.
// Because a row fits in the cache exactly, only the first pass over a row
// misses: the miss count must be COLS / LW per row, and the hit count the rest.
module tb_rowread_harness #(
  parameter int LW   = 16,
  parameter int SETS = 64,
  parameter int ROWS = 4,
  parameter int COLS = 1024,
  parameter int REP  = 8
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  import dach_pkg::*;
  localparam int DW = 32;

  logic rqv, rqr, rsv;
  logic [31:0] rqa;
  logic [LW*DW-1:0] line;
  logic [31:0] hits, misses;
  logic awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic arvalid, arready, rvalid, rready, rlast;
  logic [31:0] awaddr, araddr; logic [7:0] awlen, arlen;
  logic [63:0] wdata, rdata;
  logic [31:0] a_mem [ROWS*COLS];

  dach_l2 #(.NPORTS(1), .DATA_W(DW), .ADDR_W(32), .LINE_WORDS(LW), .SETS(SETS), .WAYS(1),
            .REPL(REPL_LRU), .MAP(MAP_STANDARD), .BEAT_WORDS(2)) dut (
    .clk, .rst_n, .rq_valid('{rqv}), .rq_ready('{rqr}), .rq_op('{OP_LOAD}), .rq_addr('{rqa}),
    .rq_wdata('{32'd0}), .rs_valid('{rsv}), .rs_afull(1'b0), .rs_line(line),
    .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast, .bvalid, .bready,
    .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata, .rlast, .hits, .misses);
  axi_mem_model #(.BUS_W(64), .MEM_BYTES(4 * ROWS * COLS), .LATENCY(8), .STALLS(1)) mem (
    .clk, .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast, .bvalid, .bready,
    .arvalid, .arready, .araddr, .arlen, .rvalid, .rready, .rdata, .rlast);

  initial begin
    logic [31:0] w;
    checks = 0; failures = 0; finished = 0;
    rqv = 0; rqa = 0;
    for (int i = 0; i < ROWS * COLS; i++) begin
      a_mem[i] = $urandom;
      for (int k = 0; k < 4; k++) mem.mem[4*i + k] = a_mem[i][8*k +: 8];
    end
    wait (rst_n);
    for (int r = 0; r < ROWS; r++)
      for (int rep = 0; rep < REP; rep++)
        for (int k = 0; k < COLS; k++) begin
          @(negedge clk);
          rqv = 1; rqa = r * COLS + k;
          do @(posedge clk); while (!rqr);
          @(negedge clk); rqv = 0;
          while (!rsv) @(negedge clk);
          w = line[(k % LW) * DW +: DW];
          checks++;
          if (w != a_mem[r * COLS + k]) failures++;
        end
    checks += 2;
    if (misses != 32'(ROWS * COLS / LW)) failures++;
    if (hits != 32'(ROWS * COLS * REP - ROWS * COLS / LW)) failures++;
    $display("%0dw %0ds: hits %0d misses %0d (hit rate %0d.%0d %%)", LW, SETS, hits, misses,
             hits * 100 / (hits + misses), (hits * 1000 / (hits + misses)) % 10);
    finished = 1;
  end
endmodule
