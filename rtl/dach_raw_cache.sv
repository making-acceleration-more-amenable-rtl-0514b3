// dach_raw_cache: small register cache that hides the read latency of the
// cache's line memory from read-after-write sequences.
//
// The cache core reads a line from its data memory one cycle after the request
// is accepted and, for a store, writes the updated line back one cycle later.
// A request accepted in the cycle a store is writing its line back therefore
// reads the old line. To keep the core at one request per cycle, every line the
// core writes is also written here, and the core takes a line from here instead
// of from the memory whenever the line index is present.
//
// LINES entries (two by default), fully associative, written in first-in
// first-out order; a lookup that matches several entries returns the most
// recently written one. Entries whose line is replaced by a refill are
// invalidated through inv_en/inv_idx. Lookup is combinational, writes and
// invalidations take effect at the next clock edge. The size, the full
// associativity, the register implementation and the FIFO replacement follow
// the cache design; the newest-wins rule for duplicates is this design's own.
module dach_raw_cache #(
  parameter int unsigned IDX_W  = 4,
  parameter int unsigned LINE_W = 128,
  parameter int unsigned LINES  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [IDX_W-1:0]  rd_idx,
  output logic              rd_hit,
  output logic [LINE_W-1:0] rd_line,
  input  logic              wr_en,
  input  logic [IDX_W-1:0]  wr_idx,
  input  logic [LINE_W-1:0] wr_line,
  input  logic              inv_en,
  input  logic [IDX_W-1:0]  inv_idx
);
  localparam int unsigned PW = (LINES <= 1) ? 1 : $clog2(LINES);

  logic              vld [LINES];
  logic [IDX_W-1:0]  idx [LINES];
  logic [LINE_W-1:0] dat [LINES];
  logic [PW-1:0]     wptr;   // next entry to write (oldest)

  // Search from the oldest entry (wptr) to the newest; the last match wins.
  always_comb begin
    logic [PW-1:0] e;
    rd_hit  = 1'b0;
    rd_line = '0;
    for (int k = 0; k < LINES; k++) begin
      e = PW'((int'(wptr) + k) % LINES);
      if (vld[e] && idx[e] == rd_idx) begin
        rd_hit  = 1'b1;
        rd_line = dat[e];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      for (int i = 0; i < LINES; i++) begin
        vld[i] <= 1'b0;
        idx[i] <= '0;
        dat[i] <= '0;
      end
    end else begin
      if (inv_en) begin
        for (int i = 0; i < LINES; i++)
          if (idx[i] == inv_idx) vld[i] <= 1'b0;
      end
      if (wr_en) begin
        vld[wptr] <= 1'b1;
        idx[wptr] <= wr_idx;
        dat[wptr] <= wr_line;
        wptr      <= (int'(wptr) == LINES - 1) ? '0 : wptr + 1'b1;
      end
    end
  end
endmodule
