// axi_mem_model: behavioural off-chip memory with an AXI4 subset slave port,
// for testbenches only (not synthesizable).
//
// Serves one read burst and one write burst at a time, incrementing bursts of
// awlen+1 / arlen+1 beats of BUS_W bits, byte addresses. A read burst starts
// LATENCY cycles after its address is accepted; with STALLS = 1 the model also
// drops rvalid, wready and the address readies on random cycles. The array is
// public (mem) so a testbench can fill and inspect it. Counts bursts served.
module axi_mem_model #(
  parameter int unsigned BUS_W     = 64,
  parameter int unsigned MEM_BYTES = 4096,
  parameter int unsigned LATENCY   = 4,
  parameter bit          STALLS    = 1'b1
) (
  input  logic             clk,
  input  logic             awvalid,
  output logic             awready,
  input  logic [31:0]      awaddr,
  input  logic [7:0]       awlen,
  input  logic             wvalid,
  output logic             wready,
  input  logic [BUS_W-1:0] wdata,
  input  logic             wlast,
  output logic             bvalid,
  input  logic             bready,
  input  logic             arvalid,
  output logic             arready,
  input  logic [31:0]      araddr,
  input  logic [7:0]       arlen,
  output logic             rvalid,
  input  logic             rready,
  output logic [BUS_W-1:0] rdata,
  output logic             rlast
);
  localparam int unsigned BB = BUS_W / 8;
  logic [7:0] mem [MEM_BYTES];
  int rd_bursts = 0, wr_bursts = 0, errors = 0;

  // read side
  logic        r_act = 0;
  logic [31:0] r_addr;
  int          r_left, r_wait;
  // write side
  logic        w_act = 0, b_pend = 0;
  logic [31:0] w_addr;
  int          w_left;

  function automatic logic coin();
    return STALLS ? ($urandom_range(0, 3) != 0) : 1'b1;
  endfunction

  initial begin
    awready = 0; wready = 0; bvalid = 0; arready = 0; rvalid = 0; rdata = '0; rlast = 0;
  end

  always @(posedge clk) begin
    // ---------------- read
    if (rvalid && rready) begin
      r_addr <= r_addr + BB;
      r_left <= r_left - 1;
      if (r_left == 1) r_act <= 0;
    end
    if (!r_act) begin
      if (arvalid && arready) begin
        r_act     <= 1;
        r_addr    <= araddr;
        r_left    <= int'(arlen) + 1;
        r_wait    <= LATENCY;
        rd_bursts <= rd_bursts + 1;
      end
    end else if (r_wait > 0) begin
      r_wait <= r_wait - 1;
    end
    // ---------------- write
    if (wvalid && wready) begin
      for (int i = 0; i < BB; i++)
        if (w_addr + i < MEM_BYTES) mem[w_addr + i] <= wdata[8*i +: 8];
      w_addr <= w_addr + BB;
      w_left <= w_left - 1;
      if ((w_left == 1) != wlast) errors <= errors + 1;
      if (w_left == 1) begin
        w_act  <= 0;
        b_pend <= 1;
      end
    end
    if (!w_act && !b_pend && awvalid && awready) begin
      w_act     <= 1;
      w_addr    <= awaddr;
      w_left    <= int'(awlen) + 1;
      wr_bursts <= wr_bursts + 1;
    end
    if (bvalid && bready) b_pend <= 0;
  end

  // outputs are driven on the falling edge so they are stable at the next rising edge
  always @(negedge clk) begin
    arready = !r_act && coin();
    awready = !w_act && !b_pend && coin();
    wready  = w_act && coin();
    bvalid  = b_pend;
    rvalid  = r_act && r_wait == 0 && coin();
    rlast   = rvalid && r_left == 1;
    for (int i = 0; i < BB; i++)
      rdata[8*i +: 8] = (r_addr + i < MEM_BYTES) ? mem[r_addr + i] : 8'h00;
  end
endmodule
