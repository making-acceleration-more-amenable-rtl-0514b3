// sync_fifo: single-clock FIFO channel between two dataflow tasks.
//
// Tasks of a dataflow graph run in parallel and talk only through FIFOs; the
// cache tasks use one FIFO for requests (from the master) and one for responses
// (back to it). This FIFO is first-word-fall-through: rd_data shows the head
// entry whenever rd_valid is high, and an entry is removed on a cycle with
// rd_valid && rd_ready. An entry is written on a cycle with wr_valid && wr_ready.
// A read and a write may happen in the same cycle. When the FIFO is full
// wr_ready is low whatever the read side does, so no path runs from rd_ready
// to wr_ready.
// almost_full is high when at most one free slot is left; a producer that has
// one result in flight can use it to decide whether to start another.
// The storage is an array; depth must be a power of two. Reset empties it.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic             almost_full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = (DEPTH <= 1) ? 1 : $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("sync_fifo: DEPTH must be a power of two >= 2");
  end

  assign count       = wptr - rptr;
  assign wr_ready    = (count < DEPTH[AW:0]);
  assign rd_valid    = (count != '0);
  assign almost_full = (count >= DEPTH[AW:0] - 1'b1);
  assign rd_data     = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_valid && wr_ready) wptr <= wptr + 1'b1;
      if (rd_valid && rd_ready) rptr <= rptr + 1'b1;
    end
  end
endmodule
