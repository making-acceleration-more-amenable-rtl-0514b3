// dach_l2: an L2 cache task, the core task and the memory-interface task
// joined by their request and response FIFOs.
//
// This is the cache-based buffering task that stands between compute tasks and
// off-chip memory: compute tasks reach it through NPORTS request/response port
// pairs, and it reaches memory through one AXI4 master. Inside, dach_core serves
// hits at one request per cycle and hands each miss, as a line request, to
// dach_mem_if through a request FIFO; the line comes back through a response
// FIFO. The two tasks only meet through these FIFOs, the cyclic
// request/response structure of the cache.
//
// Port side: see dach_core (requests valid/ready; responses as one-cycle
// rs_valid pulses, to be written into a response FIFO whose almost-full flag
// comes back on rs_afull). Memory side: see dach_mem_if.
// Parameters: NPORTS, word width, word-address width, words per line, sets,
// ways, replacement policy, address mapping, words per AXI beat, depth of the
// core/mem_if FIFOs.
module dach_l2
  import dach_pkg::*;
#(
  parameter int unsigned NPORTS     = 1,
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_WORDS = 16,
  parameter int unsigned SETS       = 4,
  parameter int unsigned WAYS       = 1,
  parameter repl_e       REPL       = REPL_LRU,
  parameter addr_map_e   MAP        = MAP_STANDARD,
  parameter int unsigned BEAT_WORDS = 8,
  parameter int unsigned MEM_FIFO_DEPTH = 2,
  localparam int unsigned OFF_W     = $clog2(LINE_WORDS),
  localparam int unsigned LADDR_W   = ADDR_W - OFF_W,
  localparam int unsigned LINE_W    = LINE_WORDS * DATA_W,
  localparam int unsigned BUS_W     = BEAT_WORDS * DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic        [NPORTS-1:0] rq_valid,
  output logic        [NPORTS-1:0] rq_ready,
  input  cache_op_e                rq_op    [NPORTS],
  input  logic        [ADDR_W-1:0] rq_addr  [NPORTS],
  input  logic        [DATA_W-1:0] rq_wdata [NPORTS],
  output logic        [NPORTS-1:0] rs_valid,
  input  logic        [NPORTS-1:0] rs_afull,
  output logic        [LINE_W-1:0] rs_line,
  output logic                     awvalid,
  input  logic                     awready,
  output logic [31:0]              awaddr,
  output logic [7:0]               awlen,
  output logic                     wvalid,
  input  logic                     wready,
  output logic [BUS_W-1:0]         wdata,
  output logic                     wlast,
  input  logic                     bvalid,
  output logic                     bready,
  output logic                     arvalid,
  input  logic                     arready,
  output logic [31:0]              araddr,
  output logic [7:0]               arlen,
  input  logic                     rvalid,
  output logic                     rready,
  input  logic [BUS_W-1:0]         rdata,
  input  logic                     rlast,
  output logic [31:0]              hits,
  output logic [31:0]              misses
);
  localparam int unsigned MRQ_W = 2 + 2 * LADDR_W + LINE_W;

  typedef struct packed {
    logic               wb;
    logic [LADDR_W-1:0] wb_laddr;
    logic [LINE_W-1:0]  wb_line;
    logic               rd;
    logic [LADDR_W-1:0] rd_laddr;
  } mem_rq_t;

  mem_rq_t            c_rq, f_rq;
  logic               c_rq_valid, c_rq_ready, f_rq_valid, f_rq_ready;
  logic [LINE_W-1:0]  m_rs_line, f_rs_line;
  logic               m_rs_valid, m_rs_ready, f_rs_valid, f_rs_ready;
  logic [MRQ_W-1:0]   f_rq_bits;

  dach_core #(
    .NPORTS(NPORTS), .DATA_W(DATA_W), .ADDR_W(ADDR_W), .LINE_WORDS(LINE_WORDS),
    .SETS(SETS), .WAYS(WAYS), .REPL(REPL), .MAP(MAP)
  ) u_core (
    .clk, .rst_n,
    .rq_valid, .rq_ready, .rq_op, .rq_addr, .rq_wdata,
    .rs_valid, .rs_afull, .rs_line,
    .mem_rq_valid   (c_rq_valid),
    .mem_rq_ready   (c_rq_ready),
    .mem_rq_wb      (c_rq.wb),
    .mem_rq_wb_laddr(c_rq.wb_laddr),
    .mem_rq_wb_line (c_rq.wb_line),
    .mem_rq_rd      (c_rq.rd),
    .mem_rq_rd_laddr(c_rq.rd_laddr),
    .mem_rs_valid   (f_rs_valid),
    .mem_rs_ready   (f_rs_ready),
    .mem_rs_line    (f_rs_line),
    .hits, .misses
  );

  sync_fifo #(.WIDTH(MRQ_W), .DEPTH(MEM_FIFO_DEPTH)) u_rq_fifo (
    .clk, .rst_n,
    .wr_valid(c_rq_valid), .wr_ready(c_rq_ready), .wr_data(MRQ_W'(c_rq)),
    .rd_valid(f_rq_valid), .rd_ready(f_rq_ready), .rd_data(f_rq_bits),
    .almost_full(), .count()
  );
  assign f_rq = mem_rq_t'(f_rq_bits);

  sync_fifo #(.WIDTH(LINE_W), .DEPTH(MEM_FIFO_DEPTH)) u_rs_fifo (
    .clk, .rst_n,
    .wr_valid(m_rs_valid), .wr_ready(m_rs_ready), .wr_data(m_rs_line),
    .rd_valid(f_rs_valid), .rd_ready(f_rs_ready), .rd_data(f_rs_line),
    .almost_full(), .count()
  );

  dach_mem_if #(
    .DATA_W(DATA_W), .LINE_WORDS(LINE_WORDS), .BEAT_WORDS(BEAT_WORDS),
    .LADDR_W(LADDR_W), .AXI_ADDR_W(32)
  ) u_mem_if (
    .clk, .rst_n,
    .rq_valid   (f_rq_valid),
    .rq_ready   (f_rq_ready),
    .rq_wb      (f_rq.wb),
    .rq_wb_laddr(f_rq.wb_laddr),
    .rq_wb_line (f_rq.wb_line),
    .rq_rd      (f_rq.rd),
    .rq_rd_laddr(f_rq.rd_laddr),
    .rs_valid   (m_rs_valid),
    .rs_ready   (m_rs_ready),
    .rs_line    (m_rs_line),
    .awvalid, .awready, .awaddr, .awlen, .wvalid, .wready, .wdata, .wlast,
    .bvalid, .bready, .arvalid, .arready, .araddr, .arlen, .rvalid, .rready,
    .rdata, .rlast
  );
endmodule
