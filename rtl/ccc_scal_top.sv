// ccc_scal_top: the scal kernel c[i] = a[i] * b built as a cache-compute-cache
// dataflow graph, with packed DSP multiplications and a multi-pumped compute
// task; beside it a multi-pumped 15 x 15 filter task; plus the
// packed-arithmetic units (SIMD adder, four-way 4-bit multiplier) as
// stand-alone datapaths.
//
// Dataflow graph (two clocks):
//   clk    a-cache (dach_l2, loads)    c-cache (dach_l2, stores)
//              |  ^                          ^  |
//          async_fifo x2                 async_fifo x2   (clock crossing)
//              v  |                          |  v
//   clk2x  dach_l1  <->  scal_compute  ------+
// The two cache tasks own the off-chip traffic, each through its own AXI4
// master; the compute task never touches memory. The compute task reads a
// through a private L1 and the a-cache, and writes c through the c-cache; at the
// end it sends a stop request that makes the c-cache write its dirty lines back,
// and done rises when that has happened. The compute task runs on clk2x, PUMP
// times the cache clock, with an initiation interval of PUMP and UNROLL/2/PUMP
// packed multipliers; the dual-clock FIFOs make every crossing safe.
//
// Interface: start/n_elems/a_base/c_base/b/busy/done in the clk2x domain (see
// scal_compute); AXI4 subsets m_a_* and m_c_* in the clk domain (see
// dach_mem_if); flt_* are valid/ready streams in the clk domain that cross to
// the filter task on clk2x and back (flt_mac_ops counts in clk2x); simd_* and
// mul4_* are combinational. rst_n is asynchronous and
// must be released synchronously to both clocks.
// Default sizes: int8 data, 16-word lines, 4 sets, direct-mapped (L1 too), 64-bit AXI
// beats, unroll 4, pump factor 2, request-response distance 6.
module ccc_scal_top
  import dach_pkg::*;
#(
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_WORDS = 16,
  parameter int unsigned A_SETS     = 4,
  parameter int unsigned A_WAYS     = 1,
  parameter int unsigned C_SETS     = 4,
  parameter int unsigned C_WAYS     = 1,
  parameter int unsigned L1_SETS    = 4,
  parameter int unsigned L1_WAYS    = 1,
  parameter int unsigned BEAT_WORDS = 8,
  parameter int unsigned UNROLL     = 4,
  parameter int unsigned PUMP       = 2,
  parameter int unsigned DIST       = 6,
  parameter int unsigned CDC_DEPTH  = 8,
  parameter int unsigned FLT_W      = 8,
  parameter int unsigned FLT_N      = 225,
  localparam int unsigned FLT_Y_W   = 2 * FLT_W + 1 + $clog2(FLT_N),
  localparam int unsigned LINE_W    = LINE_WORDS * DATA_W,
  localparam int unsigned BUS_W     = BEAT_WORDS * DATA_W
) (
  input  logic              clk,
  input  logic              clk2x,
  input  logic              rst_n,
  // kernel control (clk2x)
  input  logic              start,
  input  logic [31:0]       n_elems,
  input  logic [ADDR_W-1:0] a_base,
  input  logic [ADDR_W-1:0] c_base,
  input  logic [DATA_W-1:0] b,
  output logic              busy,
  output logic              done,
  // a-cache AXI4 master (clk)
  output logic              m_a_awvalid,
  input  logic              m_a_awready,
  output logic [31:0]       m_a_awaddr,
  output logic [7:0]        m_a_awlen,
  output logic              m_a_wvalid,
  input  logic              m_a_wready,
  output logic [BUS_W-1:0]  m_a_wdata,
  output logic              m_a_wlast,
  input  logic              m_a_bvalid,
  output logic              m_a_bready,
  output logic              m_a_arvalid,
  input  logic              m_a_arready,
  output logic [31:0]       m_a_araddr,
  output logic [7:0]        m_a_arlen,
  input  logic              m_a_rvalid,
  output logic              m_a_rready,
  input  logic [BUS_W-1:0]  m_a_rdata,
  input  logic              m_a_rlast,
  // c-cache AXI4 master (clk)
  output logic              m_c_awvalid,
  input  logic              m_c_awready,
  output logic [31:0]       m_c_awaddr,
  output logic [7:0]        m_c_awlen,
  output logic              m_c_wvalid,
  input  logic              m_c_wready,
  output logic [BUS_W-1:0]  m_c_wdata,
  output logic              m_c_wlast,
  input  logic              m_c_bvalid,
  output logic              m_c_bready,
  output logic              m_c_arvalid,
  input  logic              m_c_arready,
  output logic [31:0]       m_c_araddr,
  output logic [7:0]        m_c_arlen,
  input  logic              m_c_rvalid,
  output logic              m_c_rready,
  input  logic [BUS_W-1:0]  m_c_rdata,
  input  logic              m_c_rlast,
  // profiling
  output logic [31:0]       a_hits,
  output logic [31:0]       a_misses,
  output logic [31:0]       c_hits,
  output logic [31:0]       c_misses,
  output logic [31:0]       l1_accesses,
  output logic [31:0]       l1_hits,
  output logic [31:0]       dsp_ops,
  output logic [31:0]       kernel_cycles,
  // stand-alone SIMD adder
  input  logic              simd_mode_two24,
  input  logic              simd_sub,
  input  logic [47:0]       simd_x,
  input  logic [47:0]       simd_y,
  output logic [47:0]       simd_s,
  output logic [3:0]        simd_carry,
  // stand-alone four-way 4-bit multiplier (signed common factor)
  input  logic [3:0]        mul4_a [4],
  input  logic [3:0]        mul4_b,
  output logic [7:0]        mul4_p [4],
  // multi-pumped 2D-filter task (stream ports in clk, mac counter in clk2x)
  input  logic                      flt_in_valid,
  output logic                      flt_in_ready,
  input  logic        [FLT_W-1:0]   flt_win  [FLT_N],
  input  logic signed [FLT_W-1:0]   flt_coef [FLT_N],
  output logic                      flt_out_valid,
  input  logic                      flt_out_ready,
  output logic signed [FLT_Y_W-1:0] flt_out_y,
  output logic [31:0]               flt_mac_ops
);
  // ------------------------------------------------ compute task (clk2x)
  logic              ca_rq_valid, ca_rq_ready, ca_rs_valid, ca_rs_ready;
  logic [ADDR_W-1:0] ca_rq_addr;
  logic [LINE_W-1:0] ca_rs_line;
  logic              cc_rq_valid, cc_rq_ready, cc_rs_valid, cc_rs_ready;
  cache_op_e         cc_rq_op;
  logic [ADDR_W-1:0] cc_rq_addr;
  logic [DATA_W-1:0] cc_rq_wdata;

  scal_compute #(
    .DATA_W(DATA_W), .ADDR_W(ADDR_W), .LINE_WORDS(LINE_WORDS),
    .UNROLL(UNROLL), .PUMP(PUMP), .DIST(DIST)
  ) u_compute (
    .clk(clk2x), .rst_n,
    .start, .n_elems, .a_base, .c_base, .b, .busy, .done,
    .a_rq_valid(ca_rq_valid), .a_rq_ready(ca_rq_ready), .a_rq_addr(ca_rq_addr),
    .a_rs_valid(ca_rs_valid), .a_rs_ready(ca_rs_ready), .a_rs_line(ca_rs_line),
    .c_rq_valid(cc_rq_valid), .c_rq_ready(cc_rq_ready), .c_rq_op(cc_rq_op),
    .c_rq_addr(cc_rq_addr), .c_rq_wdata(cc_rq_wdata),
    .c_rs_valid(cc_rs_valid), .c_rs_ready(cc_rs_ready),
    .dsp_ops, .cycles(kernel_cycles)
  );

  // ------------------------------------------------ private L1 on the a port (clk2x)
  logic              l1_rq_valid, l1_rq_ready, l1_rs_valid, l1_rs_ready;
  logic [ADDR_W-1:0] l1_rq_addr;
  logic [LINE_W-1:0] l1_rs_line;

  dach_l1 #(
    .DATA_W(DATA_W), .ADDR_W(ADDR_W), .LINE_WORDS(LINE_WORDS), .SETS(L1_SETS),
    .WAYS(L1_WAYS), .L2_LINE_WORDS(LINE_WORDS)
  ) u_l1 (
    .clk(clk2x), .rst_n,
    .rq_valid(ca_rq_valid), .rq_ready(ca_rq_ready), .rq_addr(ca_rq_addr),
    .rs_valid(ca_rs_valid), .rs_ready(ca_rs_ready), .rs_line(ca_rs_line),
    .l2_rq_valid(l1_rq_valid), .l2_rq_ready(l1_rq_ready), .l2_rq_addr(l1_rq_addr),
    .l2_rs_valid(l1_rs_valid), .l2_rs_ready(l1_rs_ready), .l2_rs_line(l1_rs_line),
    .accesses(l1_accesses), .hits(l1_hits)
  );

  // ------------------------------------------------ clock-domain crossings
  logic              a_rq_valid, a_rq_ready;
  logic [ADDR_W-1:0] a_rq_addr;
  logic              a_rs_wvalid, a_rs_afull;
  logic [LINE_W-1:0] a_rs_wline;

  async_fifo #(.WIDTH(ADDR_W), .DEPTH(CDC_DEPTH)) u_a_rq_cdc (
    .wr_clk(clk2x), .wr_rst_n(rst_n),
    .wr_valid(l1_rq_valid), .wr_ready(l1_rq_ready), .wr_almost_full(), .wr_data(l1_rq_addr),
    .rd_clk(clk), .rd_rst_n(rst_n),
    .rd_valid(a_rq_valid), .rd_ready(a_rq_ready), .rd_data(a_rq_addr)
  );

  async_fifo #(.WIDTH(LINE_W), .DEPTH(CDC_DEPTH)) u_a_rs_cdc (
    .wr_clk(clk), .wr_rst_n(rst_n),
    .wr_valid(a_rs_wvalid), .wr_ready(), .wr_almost_full(a_rs_afull), .wr_data(a_rs_wline),
    .rd_clk(clk2x), .rd_rst_n(rst_n),
    .rd_valid(l1_rs_valid), .rd_ready(l1_rs_ready), .rd_data(l1_rs_line)
  );

  localparam int unsigned CRQ_W = 2 + ADDR_W + DATA_W;
  logic              c_rq_valid, c_rq_ready;
  logic [CRQ_W-1:0]  c_rq_bits;
  logic              c_rs_wvalid, c_rs_afull;

  async_fifo #(.WIDTH(CRQ_W), .DEPTH(CDC_DEPTH)) u_c_rq_cdc (
    .wr_clk(clk2x), .wr_rst_n(rst_n),
    .wr_valid(cc_rq_valid), .wr_ready(cc_rq_ready), .wr_almost_full(),
    .wr_data({cc_rq_op, cc_rq_addr, cc_rq_wdata}),
    .rd_clk(clk), .rd_rst_n(rst_n),
    .rd_valid(c_rq_valid), .rd_ready(c_rq_ready), .rd_data(c_rq_bits)
  );

  async_fifo #(.WIDTH(1), .DEPTH(4)) u_c_rs_cdc (
    .wr_clk(clk), .wr_rst_n(rst_n),
    .wr_valid(c_rs_wvalid), .wr_ready(), .wr_almost_full(c_rs_afull), .wr_data(1'b1),
    .rd_clk(clk2x), .rd_rst_n(rst_n),
    .rd_valid(cc_rs_valid), .rd_ready(cc_rs_ready), .rd_data()
  );

  // ------------------------------------------------ a-cache (clk)
  cache_op_e         a_op    [1];
  logic [ADDR_W-1:0] a_addr  [1];
  logic [DATA_W-1:0] a_wdata [1];
  assign a_op[0]    = OP_LOAD;
  assign a_addr[0]  = a_rq_addr;
  assign a_wdata[0] = '0;

  dach_l2 #(
    .NPORTS(1), .DATA_W(DATA_W), .ADDR_W(ADDR_W), .LINE_WORDS(LINE_WORDS),
    .SETS(A_SETS), .WAYS(A_WAYS), .REPL(REPL_LRU), .MAP(MAP_STANDARD),
    .BEAT_WORDS(BEAT_WORDS)
  ) u_a_cache (
    .clk, .rst_n,
    .rq_valid(a_rq_valid), .rq_ready(a_rq_ready), .rq_op(a_op), .rq_addr(a_addr),
    .rq_wdata(a_wdata),
    .rs_valid(a_rs_wvalid), .rs_afull(a_rs_afull), .rs_line(a_rs_wline),
    .awvalid(m_a_awvalid), .awready(m_a_awready), .awaddr(m_a_awaddr), .awlen(m_a_awlen),
    .wvalid(m_a_wvalid), .wready(m_a_wready), .wdata(m_a_wdata), .wlast(m_a_wlast),
    .bvalid(m_a_bvalid), .bready(m_a_bready),
    .arvalid(m_a_arvalid), .arready(m_a_arready), .araddr(m_a_araddr), .arlen(m_a_arlen),
    .rvalid(m_a_rvalid), .rready(m_a_rready), .rdata(m_a_rdata), .rlast(m_a_rlast),
    .hits(a_hits), .misses(a_misses)
  );

  // ------------------------------------------------ c-cache (clk)
  cache_op_e         c_op    [1];
  logic [ADDR_W-1:0] c_addr  [1];
  logic [DATA_W-1:0] c_wdata [1];
  assign c_op[0]    = cache_op_e'(c_rq_bits[CRQ_W-1 -: 2]);
  assign c_addr[0]  = c_rq_bits[DATA_W +: ADDR_W];
  assign c_wdata[0] = c_rq_bits[DATA_W-1:0];

  dach_l2 #(
    .NPORTS(1), .DATA_W(DATA_W), .ADDR_W(ADDR_W), .LINE_WORDS(LINE_WORDS),
    .SETS(C_SETS), .WAYS(C_WAYS), .REPL(REPL_LRU), .MAP(MAP_STANDARD),
    .BEAT_WORDS(BEAT_WORDS)
  ) u_c_cache (
    .clk, .rst_n,
    .rq_valid(c_rq_valid), .rq_ready(c_rq_ready), .rq_op(c_op), .rq_addr(c_addr),
    .rq_wdata(c_wdata),
    .rs_valid(c_rs_wvalid), .rs_afull(c_rs_afull), .rs_line(),
    .awvalid(m_c_awvalid), .awready(m_c_awready), .awaddr(m_c_awaddr), .awlen(m_c_awlen),
    .wvalid(m_c_wvalid), .wready(m_c_wready), .wdata(m_c_wdata), .wlast(m_c_wlast),
    .bvalid(m_c_bvalid), .bready(m_c_bready),
    .arvalid(m_c_arvalid), .arready(m_c_arready), .araddr(m_c_araddr), .arlen(m_c_arlen),
    .rvalid(m_c_rvalid), .rready(m_c_rready), .rdata(m_c_rdata), .rlast(m_c_rlast),
    .hits(c_hits), .misses(c_misses)
  );

  // ------------------------------------------------ multi-pumped filter task
  // The task runs on clk2x with II = PUMP, so it keeps up with one sample per
  // clk cycle while holding only ceil(FLT_N / PUMP) multipliers.
  localparam int unsigned FIN_W = 2 * FLT_N * FLT_W;
  logic [FIN_W-1:0]          fin_wbits, fin_rbits;
  logic                      f_in_valid, f_in_ready, f_out_valid, f_out_ready;
  logic        [FLT_W-1:0]   f_win  [FLT_N];
  logic signed [FLT_W-1:0]   f_coef [FLT_N];
  logic signed [FLT_Y_W-1:0] f_out_y;

  always_comb begin
    for (int i = 0; i < FLT_N; i++) begin
      fin_wbits[2*FLT_W*i +: FLT_W]         = flt_win[i];
      fin_wbits[2*FLT_W*i + FLT_W +: FLT_W] = flt_coef[i];
      f_win[i]  = fin_rbits[2*FLT_W*i +: FLT_W];
      f_coef[i] = fin_rbits[2*FLT_W*i + FLT_W +: FLT_W];
    end
  end

  async_fifo #(.WIDTH(FIN_W), .DEPTH(4)) u_f_in_cdc (
    .wr_clk(clk), .wr_rst_n(rst_n),
    .wr_valid(flt_in_valid), .wr_ready(flt_in_ready), .wr_almost_full(), .wr_data(fin_wbits),
    .rd_clk(clk2x), .rd_rst_n(rst_n),
    .rd_valid(f_in_valid), .rd_ready(f_in_ready), .rd_data(fin_rbits)
  );

  mpump_filter2d #(.W(FLT_W), .N_OP(FLT_N), .PUMP(PUMP)) u_filter (
    .clk(clk2x), .rst_n,
    .in_valid(f_in_valid), .in_ready(f_in_ready), .win(f_win), .coef(f_coef),
    .out_valid(f_out_valid), .out_ready(f_out_ready), .out_y(f_out_y),
    .mac_ops(flt_mac_ops)
  );

  async_fifo #(.WIDTH(FLT_Y_W), .DEPTH(4)) u_f_out_cdc (
    .wr_clk(clk2x), .wr_rst_n(rst_n),
    .wr_valid(f_out_valid), .wr_ready(f_out_ready), .wr_almost_full(), .wr_data(f_out_y),
    .rd_clk(clk), .rd_rst_n(rst_n),
    .rd_valid(flt_out_valid), .rd_ready(flt_out_ready), .rd_data(flt_out_y)
  );

  // ------------------------------------------------ stand-alone packed units
  silvia_add_simd u_simd (
    .mode_two24(simd_mode_two24), .sub(simd_sub), .x(simd_x), .y(simd_y),
    .s(simd_s), .carry(simd_carry)
  );

  silvia_mul4 #(.B_SIGNED(1'b1)) u_mul4 (
    .a0(mul4_a[0]), .a1(mul4_a[1]), .a2(mul4_a[2]), .a3(mul4_a[3]), .b(mul4_b),
    .p0(mul4_p[0]), .p1(mul4_p[1]), .p2(mul4_p[2]), .p3(mul4_p[3])
  );
endmodule
