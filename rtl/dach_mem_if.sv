// dach_mem_if: the memory-interface task of a DaCH-style cache.
//
// This task holds the slow miss path of the cache so that the core task can be
// scheduled for hits only. It is the slave side of the cyclic request/response
// protocol and runs the slave loop: initialise once, then forever read a
// request, execute it, write the response. A request names up to two line
// transfers: a write-back of a dirty victim line and a read of the missing line.
// The write-back, if any, is done first (one write burst, then the write
// response), then the read (one read burst). The response carries the line read
// (or, for a write-back-only request, the line written), which the core installs.
//
// Off-chip side: a subset of AXI4 with one outstanding burst, incrementing
// bursts of LINE_WORDS/BEAT_WORDS beats of BEAT_WORDS words each, byte
// addresses (line address times the line size in bytes), no IDs, no byte
// strobes (whole lines are written), responses assumed OKAY. Word 0 of a line
// is in the low bits of the first beat.
//
// The task split, the slave loop and line-granular bursts follow the cache
// architecture; the AXI subset, write-back-before-read order and the beat
// width are this design's own choices.
// rst_n also gates the assertions (disable iff); lint reports that as a
// synchronous use of an asynchronous reset, but it adds no logic.
module dach_mem_if #(
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned LINE_WORDS = 16,
  parameter int unsigned BEAT_WORDS = 8,
  parameter int unsigned LADDR_W    = 28,
  parameter int unsigned AXI_ADDR_W = 32,
  localparam int unsigned LINE_W    = LINE_WORDS * DATA_W,
  localparam int unsigned BUS_W     = BEAT_WORDS * DATA_W,
  localparam int unsigned BEATS     = LINE_WORDS / BEAT_WORDS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // request from the core
  input  logic                  rq_valid,
  output logic                  rq_ready,
  input  logic                  rq_wb,
  input  logic [LADDR_W-1:0]    rq_wb_laddr,
  input  logic [LINE_W-1:0]     rq_wb_line,
  input  logic                  rq_rd,
  input  logic [LADDR_W-1:0]    rq_rd_laddr,
  // response to the core
  output logic                  rs_valid,
  input  logic                  rs_ready,
  output logic [LINE_W-1:0]     rs_line,
  // AXI4 write address / data / response
  output logic                  awvalid,
  input  logic                  awready,
  output logic [AXI_ADDR_W-1:0] awaddr,
  output logic [7:0]            awlen,
  output logic                  wvalid,
  input  logic                  wready,
  output logic [BUS_W-1:0]      wdata,
  output logic                  wlast,
  input  logic                  bvalid,
  output logic                  bready,
  // AXI4 read address / data
  output logic                  arvalid,
  input  logic                  arready,
  output logic [AXI_ADDR_W-1:0] araddr,
  output logic [7:0]            arlen,
  input  logic                  rvalid,
  output logic                  rready,
  input  logic [BUS_W-1:0]      rdata,
  input  logic                  rlast
);
  localparam int unsigned BI_W       = (BEATS <= 1) ? 1 : $clog2(BEATS);
  localparam int unsigned LINE_BYTES = LINE_W / 8;

  initial begin
    assert (DATA_W % 8 == 0 && LINE_WORDS % BEAT_WORDS == 0 && BEATS <= 256)
      else $error("dach_mem_if: bad word, line or beat size");
  end

  typedef enum logic [2:0] {S_INIT, S_RRQ, S_AW, S_W, S_B, S_AR, S_R, S_WRS} state_e;
  state_e state;

  logic               rd_q;
  logic [LADDR_W-1:0] wb_laddr_q, rd_laddr_q;
  logic [LINE_W-1:0]  line_q;
  logic [BI_W-1:0]    beat_q;

  function automatic logic [AXI_ADDR_W-1:0] byte_addr(logic [LADDR_W-1:0] la);
    return AXI_ADDR_W'(la) * AXI_ADDR_W'(LINE_BYTES);
  endfunction

  assign rq_ready = (state == S_RRQ);
  assign rs_valid = (state == S_WRS);
  assign rs_line  = line_q;

  assign awvalid  = (state == S_AW);
  assign awaddr   = byte_addr(wb_laddr_q);
  assign awlen    = 8'(BEATS - 1);
  assign wvalid   = (state == S_W);
  assign wdata    = line_q[int'(beat_q) * BUS_W +: BUS_W];
  assign wlast    = (int'(beat_q) == BEATS - 1);
  assign bready   = (state == S_B);
  assign arvalid  = (state == S_AR);
  assign araddr   = byte_addr(rd_laddr_q);
  assign arlen    = 8'(BEATS - 1);
  assign rready   = (state == S_R);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT;
      rd_q       <= 1'b0;
      wb_laddr_q <= '0;
      rd_laddr_q <= '0;
      line_q     <= '0;
      beat_q     <= '0;
    end else begin
      case (state)
        S_INIT: state <= S_RRQ;
        S_RRQ: begin
          if (rq_valid) begin
            rd_q       <= rq_rd;
            wb_laddr_q <= rq_wb_laddr;
            rd_laddr_q <= rq_rd_laddr;
            line_q     <= rq_wb_line;
            beat_q     <= '0;
            state      <= rq_wb ? S_AW : (rq_rd ? S_AR : S_WRS);
          end
        end
        S_AW: if (awready) state <= S_W;
        S_W: begin
          if (wready) begin
            if (wlast) state <= S_B;
            else       beat_q <= beat_q + 1'b1;
          end
        end
        S_B: begin
          if (bvalid) begin
            beat_q <= '0;
            state  <= rd_q ? S_AR : S_WRS;
          end
        end
        S_AR: if (arready) state <= S_R;
        S_R: begin
          if (rvalid) begin
            line_q[int'(beat_q) * BUS_W +: BUS_W] <= rdata;
            beat_q <= beat_q + 1'b1;
            if (rlast) state <= S_WRS;
          end
        end
        S_WRS: if (rs_ready) state <= S_RRQ;
        default: state <= S_RRQ;
      endcase
    end
  end

  // AXI rule: a valid stays high, with stable payload, until its ready.
  assert property (@(posedge clk) disable iff (!rst_n) arvalid && !arready |=> arvalid && $stable(araddr))
    else $error("dach_mem_if: AR channel dropped before handshake");
  assert property (@(posedge clk) disable iff (!rst_n) awvalid && !awready |=> awvalid && $stable(awaddr))
    else $error("dach_mem_if: AW channel dropped before handshake");
  assert property (@(posedge clk) disable iff (!rst_n) wvalid && !wready |=> wvalid && $stable(wdata))
    else $error("dach_mem_if: W channel dropped before handshake");
endmodule
