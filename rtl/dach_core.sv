// dach_core: the core task of a DaCH-style L2 cache, the part that serves hits.
//
// The core takes load, store and stop requests from NPORTS ports, served in
// round-robin order, looks the word address up in a set-associative tag array
// and answers hits at a rate of one request per cycle. A miss is not handled
// here: the core sends a line request (with the dirty victim line, if any) to
// the separate memory-interface task over its mem_rq channel and stalls until
// the line comes back on mem_rs. Keeping the slow miss path in another task is
// what lets the hit path be a short, fixed pipeline.
//
// Address mapping. A word address is split into line offset, set and tag.
// MAP_STANDARD puts the set bits right above the offset; MAP_SWAPPED puts the
// tag bits right above the offset and the set bits at the top of the address,
// so that column-wise walks over a row-major matrix touch different sets.
// Replacement is least recently used (REPL_LRU, an age counter per way) or
// first-in first-out (REPL_FIFO, a pointer per set); invalid ways are filled
// first under LRU. The write policy is write-back with write-allocate.
// LINE_WORDS and SETS are powers of two; WAYS may be any number, so that, for
// instance, a 15-way cache can act as the line buffer of a 15 x 15 window.
//
// Pipeline (clk):
//   stage A  arbitration, tag compare, data-memory read issued (one cycle)
//   stage B  line available; a load returns the line on rs_*, a store merges
//            its word and writes the line back
// A request accepted in cycle t is answered in cycle t+1. A store written back
// in cycle t is not yet visible to the memory read issued in t, so stage B
// takes its line from dach_raw_cache whenever it holds the line.
// Loads are accepted only if the port's response FIFO reports room for two
// entries (rs_afull low), so stage B never has to wait.
//
// Requests (per port, valid/ready): op (dach_pkg::cache_op_e), word address,
// write data. Responses (per port, rs_valid for one cycle, shared rs_line): the
// whole line holding the addressed word, or, for OP_STOP, an acknowledgement
// after all dirty lines were written back. mem_rq carries {write back?,
// victim line address, victim line, read?, line address to read}; mem_rs
// carries the line read. hits counts requests served without a miss, misses
// counts line refills; hits + misses is the number of accepted requests.
//
// The task split (core / memory interface), round-robin ports, hit pipeline
// with stall on miss, the two address mappings, the LRU/FIFO choice and the
// two-line RAW cache follow the cache architecture. Write-back with
// write-allocate, the age-counter LRU, the stop/flush request and the line-wide
// response are this design's own choices.
// rst_n also gates the assertions (disable iff); lint reports that as a
// synchronous use of an asynchronous reset, but it adds no logic.
module dach_core
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
  localparam int unsigned OFF_W     = $clog2(LINE_WORDS),
  localparam int unsigned LADDR_W   = ADDR_W - OFF_W,
  localparam int unsigned LINE_W    = LINE_WORDS * DATA_W
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // ports (request side)
  input  logic        [NPORTS-1:0]       rq_valid,
  output logic        [NPORTS-1:0]       rq_ready,
  input  cache_op_e                      rq_op    [NPORTS],
  input  logic        [ADDR_W-1:0]       rq_addr  [NPORTS],
  input  logic        [DATA_W-1:0]       rq_wdata [NPORTS],
  // ports (response side)
  output logic        [NPORTS-1:0]       rs_valid,
  input  logic        [NPORTS-1:0]       rs_afull,
  output logic        [LINE_W-1:0]       rs_line,
  // memory-interface task
  output logic                           mem_rq_valid,
  input  logic                           mem_rq_ready,
  output logic                           mem_rq_wb,
  output logic        [LADDR_W-1:0]      mem_rq_wb_laddr,
  output logic        [LINE_W-1:0]       mem_rq_wb_line,
  output logic                           mem_rq_rd,
  output logic        [LADDR_W-1:0]      mem_rq_rd_laddr,
  input  logic                           mem_rs_valid,
  output logic                           mem_rs_ready,
  input  logic        [LINE_W-1:0]       mem_rs_line,
  // profiling
  output logic        [31:0]             hits,
  output logic        [31:0]             misses
);
  localparam int unsigned SET_W  = $clog2(SETS);
  localparam int unsigned TAG_W  = LADDR_W - SET_W;
  localparam int unsigned SI_W   = idx_bits(SETS);
  localparam int unsigned WI_W   = idx_bits(WAYS);
  localparam int unsigned LI_W   = idx_bits(SETS * WAYS);
  localparam int unsigned PI_W   = idx_bits(NPORTS);
  localparam int unsigned OI_W   = idx_bits(LINE_WORDS);

  initial begin
    assert ((LINE_WORDS & (LINE_WORDS - 1)) == 0 && (SETS & (SETS - 1)) == 0 && WAYS >= 1)
      else $error("dach_core: LINE_WORDS and SETS must be powers of two");
  end

  // ------------------------------------------------------------ address split
  function automatic logic [SI_W-1:0] set_of(logic [LADDR_W-1:0] la);
    if (SET_W == 0) return '0;
    if (MAP == MAP_STANDARD) return SI_W'(la % LADDR_W'(SETS));
    return SI_W'(la >> TAG_W);
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(logic [LADDR_W-1:0] la);
    if (MAP == MAP_STANDARD) return TAG_W'(la >> SET_W);
    return TAG_W'(la);
  endfunction

  function automatic logic [LADDR_W-1:0] laddr_of(logic [TAG_W-1:0] t, logic [SI_W-1:0] s);
    if (SET_W == 0) return LADDR_W'(t);
    if (MAP == MAP_STANDARD) return (LADDR_W'(t) << SET_W) | LADDR_W'(s);
    return (LADDR_W'(s) << TAG_W) | LADDR_W'(t);
  endfunction

  // ------------------------------------------------------------ state
  typedef enum logic [2:0] {
    S_RUN, S_MISS_RD, S_MISS_REQ, S_MISS_WAIT,
    S_FLUSH_CHK, S_FLUSH_REQ, S_FLUSH_WAIT, S_FLUSH_ACK
  } state_e;
  state_e state;

  logic [TAG_W-1:0]  tag_q   [SETS][WAYS];
  logic              valid_q [SETS][WAYS];
  logic              dirty_q [SETS][WAYS];
  logic [WI_W-1:0]   age_q   [SETS][WAYS];   // LRU age, 0 = most recent
  logic [WI_W-1:0]   fifo_q  [SETS];         // FIFO victim pointer
  logic [LINE_W-1:0] data_mem [SETS*WAYS];

  logic [PI_W-1:0]   rr_q;            // last port granted
  logic              hold_q;          // a missed request must be retried first
  logic [PI_W-1:0]   hold_port_q;

  // miss / flush bookkeeping
  logic [SI_W-1:0]    m_set_q;
  logic [WI_W-1:0]    m_way_q;
  logic [LADDR_W-1:0] m_laddr_q;
  logic [LINE_W-1:0]  rd_line_q;      // victim line read for write-back
  logic [LI_W:0]      fl_idx_q;
  logic [PI_W-1:0]    fl_port_q;

  // stage B
  logic              b_valid_q, b_store_q;
  logic [PI_W-1:0]   b_port_q;
  logic [LI_W-1:0]   b_idx_q;
  logic [OI_W-1:0]   b_off_q;
  logic [DATA_W-1:0] b_wdata_q;
  logic [LINE_W-1:0] b_line_q;

  // ------------------------------------------------------------ stage A
  logic              a_found;
  logic [PI_W-1:0]   a_port;
  cache_op_e         a_op;
  logic [ADDR_W-1:0] a_addr;
  logic [LADDR_W-1:0] a_laddr;
  logic [SI_W-1:0]   a_set;
  logic [TAG_W-1:0]  a_tag;
  logic [OI_W-1:0]   a_off;
  logic              a_hit;
  logic [WI_W-1:0]   a_way;
  logic [WI_W-1:0]   a_victim;
  logic              a_accept_hit, a_start_miss, a_accept_stop;

  function automatic logic eligible(int p);
    return rq_valid[p] && (rq_op[p] == OP_STORE || !rs_afull[p]);
  endfunction

  always_comb begin
    int unsigned cand;
    cand    = 0;
    a_found = 1'b0;
    a_port  = '0;
    if (hold_q) begin
      a_found = eligible(int'(hold_port_q));
      a_port  = hold_port_q;
    end else begin
      for (int k = NPORTS; k >= 1; k--) begin
        cand = (int'(rr_q) + k) % NPORTS;
        if (eligible(int'(cand))) begin
          a_found = 1'b1;
          a_port  = PI_W'(cand);
        end
      end
    end
    a_op    = rq_op[a_port];
    a_addr  = rq_addr[a_port];
    a_laddr = LADDR_W'(a_addr >> OFF_W);
    a_off   = (OFF_W == 0) ? '0 : OI_W'(a_addr % ADDR_W'(LINE_WORDS));
    a_set   = set_of(a_laddr);
    a_tag   = tag_of(a_laddr);
    a_hit   = 1'b0;
    a_way   = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[a_set][w] && tag_q[a_set][w] == a_tag) begin
        a_hit = 1'b1;
        a_way = WI_W'(w);
      end
    end
    // victim way
    a_victim = '0;
    if (REPL == REPL_FIFO) begin
      a_victim = fifo_q[a_set];
    end else begin
      for (int w = 0; w < WAYS; w++)
        if (age_q[a_set][w] == WI_W'(WAYS - 1)) a_victim = WI_W'(w);
      for (int w = WAYS - 1; w >= 0; w--)
        if (!valid_q[a_set][w]) a_victim = WI_W'(w);
    end
    a_accept_hit  = (state == S_RUN) && a_found && a_op != OP_STOP && a_hit;
    a_start_miss  = (state == S_RUN) && a_found && a_op != OP_STOP && !a_hit && !b_valid_q;
    a_accept_stop = (state == S_RUN) && a_found && a_op == OP_STOP && !b_valid_q;
  end

  always_comb begin
    rq_ready = '0;
    if (a_accept_hit || a_accept_stop) rq_ready[a_port] = 1'b1;
  end

  // ------------------------------------------------------------ stage B
  logic              raw_hit;
  logic [LINE_W-1:0] raw_line;
  logic [LINE_W-1:0] b_src, b_merged;
  logic              refill;

  assign refill = (state == S_MISS_WAIT) && mem_rs_valid;

  dach_raw_cache #(.IDX_W(LI_W), .LINE_W(LINE_W), .LINES(2)) u_raw (
    .clk, .rst_n,
    .rd_idx (b_idx_q),
    .rd_hit (raw_hit),
    .rd_line(raw_line),
    .wr_en  (b_valid_q && b_store_q),
    .wr_idx (b_idx_q),
    .wr_line(b_merged),
    .inv_en (refill),
    .inv_idx(LI_W'(m_set_q) * LI_W'(WAYS) + LI_W'(m_way_q))
  );

  always_comb begin
    b_src    = raw_hit ? raw_line : b_line_q;
    b_merged = b_src;
    b_merged[int'(b_off_q) * DATA_W +: DATA_W] = b_wdata_q;
  end

  always_comb begin
    rs_valid = '0;
    rs_line  = b_src;
    if (b_valid_q && !b_store_q) rs_valid[b_port_q] = 1'b1;
    if (state == S_FLUSH_ACK)    rs_valid[fl_port_q] = 1'b1;
  end

  // ------------------------------------------------------------ memory task channel
  logic [LI_W-1:0] fl_idx;
  logic [SI_W-1:0] fl_set;
  logic [WI_W-1:0] fl_way;
  assign fl_idx = LI_W'(fl_idx_q);
  assign fl_set = SI_W'(fl_idx_q / (LI_W+1)'(WAYS));
  assign fl_way = WI_W'(fl_idx_q % (LI_W+1)'(WAYS));

  always_comb begin
    mem_rq_valid    = (state == S_MISS_REQ) || (state == S_FLUSH_REQ);
    mem_rq_wb       = (state == S_FLUSH_REQ) ||
                      (valid_q[m_set_q][m_way_q] && dirty_q[m_set_q][m_way_q]);
    mem_rq_wb_laddr = (state == S_FLUSH_REQ) ? laddr_of(tag_q[fl_set][fl_way], fl_set)
                                             : laddr_of(tag_q[m_set_q][m_way_q], m_set_q);
    mem_rq_wb_line  = rd_line_q;
    mem_rq_rd       = (state == S_MISS_REQ);
    mem_rq_rd_laddr = m_laddr_q;
    mem_rs_ready    = (state == S_MISS_WAIT) || (state == S_FLUSH_WAIT);
  end

  // ------------------------------------------------------------ data memory
  always_ff @(posedge clk) begin
    if (a_accept_hit)
      b_line_q <= data_mem[LI_W'(a_set) * LI_W'(WAYS) + LI_W'(a_way)];
    if (state == S_MISS_RD)
      rd_line_q <= data_mem[LI_W'(m_set_q) * LI_W'(WAYS) + LI_W'(m_way_q)];
    else if (state == S_FLUSH_CHK && fl_idx_q < (LI_W+1)'(SETS * WAYS))
      rd_line_q <= data_mem[fl_idx];
    if (b_valid_q && b_store_q)
      data_mem[b_idx_q] <= b_merged;
    if (refill)
      data_mem[LI_W'(m_set_q) * LI_W'(WAYS) + LI_W'(m_way_q)] <= mem_rs_line;
  end

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_RUN;
      rr_q        <= PI_W'(NPORTS - 1);
      hold_q      <= 1'b0;
      hold_port_q <= '0;
      m_set_q     <= '0;
      m_way_q     <= '0;
      m_laddr_q   <= '0;
      fl_idx_q    <= '0;
      fl_port_q   <= '0;
      b_valid_q   <= 1'b0;
      b_store_q   <= 1'b0;
      b_port_q    <= '0;
      b_idx_q     <= '0;
      b_off_q     <= '0;
      b_wdata_q   <= '0;
      hits        <= '0;
      misses      <= '0;
      for (int s = 0; s < SETS; s++) begin
        fifo_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          tag_q[s][w]   <= '0;
          valid_q[s][w] <= 1'b0;
          dirty_q[s][w] <= 1'b0;
          age_q[s][w]   <= WI_W'(w);
        end
      end
    end else begin
      // stage A -> B
      b_valid_q <= a_accept_hit;
      if (a_accept_hit) begin
        b_store_q <= (a_op == OP_STORE);
        b_port_q  <= a_port;
        b_idx_q   <= LI_W'(a_set) * LI_W'(WAYS) + LI_W'(a_way);
        b_off_q   <= a_off;
        b_wdata_q <= rq_wdata[a_port];
        rr_q      <= a_port;
        hold_q    <= 1'b0;
        if (!hold_q) hits <= hits + 1'b1;  // the retry after a miss is not a hit
        if (a_op == OP_STORE) dirty_q[a_set][a_way] <= 1'b1;
        if (REPL == REPL_LRU) begin
          for (int w = 0; w < WAYS; w++)
            if (age_q[a_set][w] < age_q[a_set][a_way]) age_q[a_set][w] <= age_q[a_set][w] + 1'b1;
          age_q[a_set][a_way] <= '0;
        end
      end

      case (state)
        S_RUN: begin
          if (a_start_miss) begin
            state       <= S_MISS_RD;
            hold_q      <= 1'b1;
            hold_port_q <= a_port;
            m_set_q     <= a_set;
            m_way_q     <= a_victim;
            m_laddr_q   <= a_laddr;
            misses      <= misses + 1'b1;
          end else if (a_accept_stop) begin
            state     <= S_FLUSH_CHK;
            fl_idx_q  <= '0;
            fl_port_q <= a_port;
            rr_q      <= a_port;
          end
        end
        S_MISS_RD:  state <= S_MISS_REQ;
        S_MISS_REQ: if (mem_rq_ready) state <= S_MISS_WAIT;
        S_MISS_WAIT: begin
          if (mem_rs_valid) begin
            tag_q[m_set_q][m_way_q]   <= tag_of(m_laddr_q);
            valid_q[m_set_q][m_way_q] <= 1'b1;
            dirty_q[m_set_q][m_way_q] <= 1'b0;
            if (REPL == REPL_FIFO)
              fifo_q[m_set_q] <= (int'(m_way_q) == WAYS - 1) ? '0 : m_way_q + 1'b1;
            state <= S_RUN;
          end
        end
        S_FLUSH_CHK: begin
          if (fl_idx_q == (LI_W+1)'(SETS * WAYS))
            state <= S_FLUSH_ACK;
          else if (valid_q[fl_set][fl_way] && dirty_q[fl_set][fl_way])
            state <= S_FLUSH_REQ;
          else
            fl_idx_q <= fl_idx_q + 1'b1;
        end
        S_FLUSH_REQ: if (mem_rq_ready) state <= S_FLUSH_WAIT;
        S_FLUSH_WAIT: begin
          if (mem_rs_valid) begin
            dirty_q[fl_set][fl_way] <= 1'b0;
            fl_idx_q <= fl_idx_q + 1'b1;
            state    <= S_FLUSH_CHK;
          end
        end
        S_FLUSH_ACK: state <= S_RUN;
        default:     state <= S_RUN;
      endcase
    end
  end

  // A port must hold its request stable until it is accepted.
  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      rq_valid[p] && !rq_ready[p] |=> rq_valid[p] && $stable(rq_addr[p]) && $stable(rq_op[p]))
      else $error("dach_core: port %0d dropped or changed a pending request", p);
  end
endmodule
