// dach_l1: private read-only L1 cache in front of one L2 cache port.
//
// A compute task that needs more than one access per cycle to the same array
// gets several L2 ports, and each port may have a private L1 cache placed
// inside the compute task. An L1 hit is answered locally; only a miss goes to
// the L2 port, never straight to off-chip memory, so the miss cost the compute
// task sees is an L2 access.
//
// Requests are word addresses (valid/ready); responses are the L1 line holding
// the word (valid/ready). The L1 has SETS sets of WAYS ways, each line
// LINE_WORDS words; the L2 behind it uses lines of L2_LINE_WORDS words
// (a multiple of LINE_WORDS), and on a refill the L1 keeps only the part of
// the L2 line that holds the missed word. Standard address mapping; the way to
// refill in a set is chosen first-in first-out. A hit is answered one cycle
// after the request, and back-to-back hits run at one per cycle. On a miss the
// L1 issues one load to the L2 port, waits for its line, installs it and
// answers; requests are served in order, one miss at a time.
// accesses/hits count requests for profiling.
//
// The read-only private L1 that forwards misses to L2 and its configurable
// sets, ways and words per line follow the cache architecture; FIFO
// replacement and the blocking miss are this design's simplifications.
module dach_l1 #(
  parameter int unsigned DATA_W        = 8,
  parameter int unsigned ADDR_W        = 32,
  parameter int unsigned LINE_WORDS    = 16,
  parameter int unsigned SETS          = 4,
  parameter int unsigned WAYS          = 1,
  parameter int unsigned L2_LINE_WORDS = LINE_WORDS,
  localparam int unsigned LINE_W       = LINE_WORDS * DATA_W,
  localparam int unsigned L2_LINE_W    = L2_LINE_WORDS * DATA_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rq_valid,
  output logic                 rq_ready,
  input  logic [ADDR_W-1:0]    rq_addr,
  output logic                 rs_valid,
  input  logic                 rs_ready,
  output logic [LINE_W-1:0]    rs_line,
  output logic                 l2_rq_valid,
  input  logic                 l2_rq_ready,
  output logic [ADDR_W-1:0]    l2_rq_addr,
  input  logic                 l2_rs_valid,
  output logic                 l2_rs_ready,
  input  logic [L2_LINE_W-1:0] l2_rs_line,
  output logic [31:0]          accesses,
  output logic [31:0]          hits
);
  localparam int unsigned OFF_W = $clog2(LINE_WORDS);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned SI_W  = (SETS <= 1) ? 1 : SET_W;
  localparam int unsigned WI_W  = (WAYS <= 1) ? 1 : $clog2(WAYS);
  localparam int unsigned TAG_W = ADDR_W - OFF_W - SET_W;
  localparam int unsigned NSUB  = L2_LINE_WORDS / LINE_WORDS;

  initial begin
    assert (L2_LINE_WORDS % LINE_WORDS == 0 && L2_LINE_WORDS >= LINE_WORDS)
      else $error("dach_l1: L2_LINE_WORDS must be a multiple of LINE_WORDS");
  end

  typedef enum logic [1:0] {S_LOOKUP, S_REQ, S_WAIT} state_e;
  state_e state;

  logic [TAG_W-1:0]  tag_q  [SETS][WAYS];
  logic              vld_q  [SETS][WAYS];
  logic [LINE_W-1:0] line_q [SETS][WAYS];
  logic [WI_W-1:0]   fifo_q [SETS];

  logic [ADDR_W-1:0] miss_addr_q;
  logic              out_valid_q;
  logic [LINE_W-1:0] out_line_q;

  function automatic logic [SI_W-1:0] set_of(logic [ADDR_W-1:0] a);
    return (SET_W == 0) ? '0 : SI_W'((a >> OFF_W) % ADDR_W'(SETS));
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(logic [ADDR_W-1:0] a);
    return TAG_W'(a >> (OFF_W + SET_W));
  endfunction

  logic            q_hit;
  logic [WI_W-1:0] q_way;
  always_comb begin
    q_hit = 1'b0;
    q_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld_q[set_of(rq_addr)][w] && tag_q[set_of(rq_addr)][w] == tag_of(rq_addr)) begin
        q_hit = 1'b1;
        q_way = WI_W'(w);
      end
  end

  // the part of the L2 line that holds the missed word
  logic [LINE_W-1:0] refill;
  always_comb begin
    refill = l2_rs_line[LINE_W-1:0];
    for (int k = 0; k < NSUB; k++)
      if ((miss_addr_q / ADDR_W'(LINE_WORDS)) % ADDR_W'(NSUB) == ADDR_W'(k))
        refill = l2_rs_line[k*LINE_W +: LINE_W];
  end

  assign rq_ready    = (state == S_LOOKUP) && (!out_valid_q || rs_ready);
  assign rs_valid    = out_valid_q;
  assign rs_line     = out_line_q;
  assign l2_rq_valid = (state == S_REQ);
  assign l2_rq_addr  = miss_addr_q;
  assign l2_rs_ready = (state == S_WAIT);

  always_ff @(posedge clk) begin
    if (rq_valid && rq_ready && q_hit) out_line_q <= line_q[set_of(rq_addr)][q_way];
    if (state == S_WAIT && l2_rs_valid) begin
      out_line_q <= refill;
      line_q[set_of(miss_addr_q)][fifo_q[set_of(miss_addr_q)]] <= refill;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_LOOKUP;
      miss_addr_q <= '0;
      out_valid_q <= 1'b0;
      accesses    <= '0;
      hits        <= '0;
      for (int s = 0; s < SETS; s++) begin
        fifo_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          tag_q[s][w] <= '0;
          vld_q[s][w] <= 1'b0;
        end
      end
    end else begin
      if (out_valid_q && rs_ready) out_valid_q <= 1'b0;
      case (state)
        S_LOOKUP: begin
          if (rq_valid && rq_ready) begin
            accesses <= accesses + 1'b1;
            if (q_hit) begin
              hits        <= hits + 1'b1;
              out_valid_q <= 1'b1;
            end else begin
              miss_addr_q <= rq_addr;
              state       <= S_REQ;
            end
          end
        end
        S_REQ: if (l2_rq_ready) state <= S_WAIT;
        S_WAIT: begin
          if (l2_rs_valid) begin
            tag_q[set_of(miss_addr_q)][fifo_q[set_of(miss_addr_q)]] <= tag_of(miss_addr_q);
            vld_q[set_of(miss_addr_q)][fifo_q[set_of(miss_addr_q)]] <= 1'b1;
            fifo_q[set_of(miss_addr_q)] <= (int'(fifo_q[set_of(miss_addr_q)]) == WAYS - 1)
                                           ? '0 : fifo_q[set_of(miss_addr_q)] + 1'b1;
            out_valid_q <= 1'b1;
            state       <= S_LOOKUP;
          end
        end
        default: state <= S_LOOKUP;
      endcase
    end
  end
endmodule
