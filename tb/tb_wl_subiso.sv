// tb_wl_subiso: the two cache configurations of a sub-graph matching
// accelerator, run on a graph walk. Words are 128 bits. The node table sits
// behind a single-port cache of 512 sets with 16-word lines, the edge table
// behind a two-port cache of 4096 sets with 8-word lines. The graph is
// synthetic (this testbench's choice, as the real accelerator's input graphs
// and search order are data-dependent): 2048 nodes, each with 4 to 11 edges,
// most of them to nearby node numbers so that locality exists for the caches
// to find, some to random nodes. A node word holds {label, degree, first edge};
// an edge word holds {weight, target}. The testbench is the matcher: from each
// of 600 start nodes it reads the node, fetches its edges two at a time on
// the two edge-cache ports in parallel, and reads every target node. Every
// loaded word is compared with the table, the sum of the target labels seen is
// compared with a reference, and both caches must have hits and misses.
module tb_wl_subiso;
  import dach_pkg::*;
  localparam int DW = 128, NN = 2048, MAXE = NN * 12, NSTART = 600;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  `define AXI_W(p) \
    logic p``awvalid, p``awready, p``wvalid, p``wready, p``wlast, p``bvalid, p``bready; \
    logic p``arvalid, p``arready, p``rvalid, p``rready, p``rlast; \
    logic [31:0] p``awaddr, p``araddr; logic [7:0] p``awlen, p``arlen; \
    logic [DW-1:0] p``wdata, p``rdata;
  `AXI_W(xn_)
  `AXI_W(xe_)
  `define AXI_C(p) \
    .awvalid(p``awvalid), .awready(p``awready), .awaddr(p``awaddr), .awlen(p``awlen), \
    .wvalid(p``wvalid), .wready(p``wready), .wdata(p``wdata), .wlast(p``wlast), \
    .bvalid(p``bvalid), .bready(p``bready), .arvalid(p``arvalid), .arready(p``arready), \
    .araddr(p``araddr), .arlen(p``arlen), .rvalid(p``rvalid), .rready(p``rready), \
    .rdata(p``rdata), .rlast(p``rlast)

  // node cache: one port
  logic nrqv, nrqr, nrsv;
  logic [31:0] nrqa;
  logic [16*DW-1:0] nline;
  logic [31:0] nhits, nmisses;
  dach_l2 #(.NPORTS(1), .DATA_W(DW), .ADDR_W(32), .LINE_WORDS(16), .SETS(512), .WAYS(1),
            .REPL(REPL_LRU), .MAP(MAP_STANDARD), .BEAT_WORDS(1)) u_node (
    .clk, .rst_n, .rq_valid('{nrqv}), .rq_ready('{nrqr}), .rq_op('{OP_LOAD}), .rq_addr('{nrqa}),
    .rq_wdata('{128'd0}), .rs_valid('{nrsv}), .rs_afull(1'b0), .rs_line(nline), `AXI_C(xn_),
    .hits(nhits), .misses(nmisses));
  axi_mem_model #(.BUS_W(DW), .MEM_BYTES(16 * NN), .LATENCY(8), .STALLS(1)) m_node (.clk, `AXI_C(xn_));

  // edge cache: two ports
  logic [1:0] erqv, erqr, ersv;
  logic [31:0] erqa [2];
  cache_op_e eop [2];
  logic [DW-1:0] ewd [2];
  logic [8*DW-1:0] eline;
  logic [31:0] ehits, emisses;
  dach_l2 #(.NPORTS(2), .DATA_W(DW), .ADDR_W(32), .LINE_WORDS(8), .SETS(4096), .WAYS(1),
            .REPL(REPL_LRU), .MAP(MAP_STANDARD), .BEAT_WORDS(1)) u_edge (
    .clk, .rst_n, .rq_valid(erqv), .rq_ready(erqr), .rq_op(eop), .rq_addr(erqa),
    .rq_wdata(ewd), .rs_valid(ersv), .rs_afull(2'b00), .rs_line(eline), `AXI_C(xe_),
    .hits(ehits), .misses(emisses));
  axi_mem_model #(.BUS_W(DW), .MEM_BYTES(16 * MAXE), .LATENCY(8), .STALLS(1)) m_edge (.clk, `AXI_C(xe_));

  logic [DW-1:0] node_t [NN];
  logic [DW-1:0] edge_t [MAXE];
  int n_edges = 0;

  task automatic nload(input int addr, output logic [DW-1:0] w);
    @(negedge clk);
    nrqv = 1; nrqa = addr;
    do @(posedge clk); while (!nrqr);
    @(negedge clk); nrqv = 0;
    while (!nrsv) @(negedge clk);
    w = nline[(addr % 16) * DW +: DW];
    checks++;
    if (w != node_t[addr]) failures++;
  endtask

  task automatic eload(input int pt, input int addr, output logic [DW-1:0] w);
    @(negedge clk);
    erqv[pt] = 1; erqa[pt] = addr;
    do @(posedge clk); while (!erqr[pt]);
    @(negedge clk); erqv[pt] = 0;
    while (!ersv[pt]) @(negedge clk);
    w = eline[(addr % 8) * DW +: DW];
    checks++;
    if (w != edge_t[addr]) failures++;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint lab_sum = 0, ref_sum = 0;
    int both = 0;
    nrqv = 0; nrqa = 0; erqv = '0;
    for (int p = 0; p < 2; p++) begin erqa[p] = 0; eop[p] = OP_LOAD; ewd[p] = '0; end
    // build the graph
    for (int n = 0; n < NN; n++) begin
      int deg, t;
      deg = 4 + int'($urandom % 8);
      node_t[n] = {32'($urandom % 64), 32'd0, 32'(deg), 32'(n_edges)};
      for (int e = 0; e < deg; e++) begin
        t = ($urandom % 4 == 0) ? int'($urandom % NN) : (n + int'($urandom % 33) - 16 + NN) % NN;
        edge_t[n_edges] = {32'($urandom), 32'd0, 32'd0, 32'(t)};
        n_edges++;
      end
    end
    for (int n = 0; n < NN; n++) for (int k = 0; k < 16; k++) m_node.mem[16*n + k] = node_t[n][8*k +: 8];
    for (int e = 0; e < n_edges; e++) for (int k = 0; k < 16; k++) m_edge.mem[16*e + k] = edge_t[e][8*k +: 8];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the walk: start nodes drift through the graph with random jumps
    begin
      int s = 0;
      for (int k = 0; k < NSTART; k++) begin
        logic [DW-1:0] nw, tw;
        int deg, first;
        s = ($urandom % 8 == 0) ? int'($urandom % NN) : (s + 1 + int'($urandom % 4)) % NN;
        nload(s, nw);
        deg = int'(nw[63:32]); first = int'(nw[31:0]);
        for (int e = 0; e < deg; e += 2) begin
          logic [DW-1:0] ew [2];
          int tgt [2];
          if (e + 1 < deg) begin
            fork
              eload(0, first + e, ew[0]);
              eload(1, first + e + 1, ew[1]);
            join
            both++;
          end else eload(0, first + e, ew[0]);
          for (int j = 0; j < 2 && e + j < deg; j++) begin
            tgt[j] = int'(ew[j][31:0]);
            nload(tgt[j], tw);
            lab_sum += longint'(tw[127:96]);
            ref_sum += longint'(node_t[int'(edge_t[first + e + j][31:0])][127:96]);
          end
        end
      end
    end
    checks += 3;
    if (lab_sum != ref_sum) failures++;
    if (nhits == 0 || nmisses == 0 || ehits == 0 || emisses == 0) failures++;
    if (both == 0) failures++;
    $display("node cache hits %0d misses %0d; edge cache hits %0d misses %0d; paired edge fetches %0d",
             nhits, nmisses, ehits, emisses, both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
