// async_fifo: FIFO with independent write and read clocks.
//
// When the tasks of a dataflow graph each get their own clock, the FIFOs that
// join tasks of different clock domains are the only place where signals cross
// between clocks, so the crossing is made safe here and nowhere else. This is the
// usual dual-clock FIFO: binary read and write pointers one bit wider than the
// address, converted to Gray code, and each Gray pointer passed into the other
// domain through a two-flip-flop synchroniser. The write side sees the FIFO full
// from the synchronised read pointer, the read side sees it empty from the
// synchronised write pointer, so both flags are conservative and a few cycles late.
// The interface matches sync_fifo (valid/ready on both sides, first-word fall
// through); wr_almost_full, in the write domain, is high when at most one free
// slot is left, as seen from the write side. Depth must be a power of two, at least 4. The use of a dual-clock FIFO at clock
// boundaries follows the multi-clock dataflow method; the Gray-code construction
// is this design's own choice.
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  output logic             wr_almost_full,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in the read domain

  initial begin
    assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("async_fifo: DEPTH must be a power of two >= 4");
  end

  function automatic logic [AW:0] bin2gray(logic [AW:0] bv);
    return bv ^ (bv >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] bv;
    bv[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) bv[i] = bv[i+1] ^ g[i];
    return bv;
  endfunction

  // ---------------- write domain
  logic [AW:0] wbin_next, wused;
  // Entries as seen from the write side (an upper bound of the true count).
  assign wused          = wbin - gray2bin(rgray_w2);
  assign wr_almost_full = (wused >= (AW+1)'(DEPTH - 1));
  assign wr_ready  = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_next = wbin + 1'b1;

  always_ff @(posedge wr_clk) begin
    if (wr_valid && wr_ready) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_valid && wr_ready) begin
        wbin  <= wbin_next;
        wgray <= bin2gray(wbin_next);
      end
    end
  end

  // ---------------- read domain
  logic [AW:0] rbin_next;
  assign rd_valid  = (rgray != wgray_r2);
  assign rd_data   = mem[rbin[AW-1:0]];
  assign rbin_next = rbin + 1'b1;

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_valid && rd_ready) begin
        rbin  <= rbin_next;
        rgray <= bin2gray(rbin_next);
      end
    end
  end
endmodule
