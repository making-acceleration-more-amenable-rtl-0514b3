// tb_ccc_scal_top: end-to-end test of the cache-compute-cache scal design with
// every parameter at its default. Two AXI memory models (with latency and
// random ready stalls) hold a and c. The cache clock runs at half the compute
// clock. Three kernel runs (c = a * b, int8) at different sizes and bases, one
// of them without a reset in between so cached lines are reused, are checked
// byte by byte against a reference in off-chip memory after done: c must be
// a[i]*b truncated, and every other byte of both memories unchanged.
// Alongside, the SIMD adder and the four-way multiplier are driven with random
// operands and checked against a reference every compute cycle.
// Two streams of 100 filter samples run beside the first and the last kernel
// run; each result is compared in order with a direct 225-term sum. The first
// stream keeps both handshakes open and must finish at one sample per clk
// cycle (within a few cycles of crossing latency); the second throttles both
// sides at random. The filter's MAC counter must read 225 per sample since
// the reset.
// Each mechanism must happen at least once, or it counts as a failure:
// a-cache and c-cache misses, c-cache write-backs (evictions and the final
// flush), read-after-write bypasses in the c-cache, cache stalls while a miss
// is served, L1 hits and misses, traffic through every clock-domain crossing,
// packed-DSP
// operations (UNROLL/2 per iteration), both SIMD modes and both operations.
// A write into a full clock-crossing FIFO counts as a failure. The number of
// cycles the compute task sits at its outstanding-request limit is reported
// only: behind the blocking L1 at most two line requests are ever in flight.
module tb_ccc_scal_top;
  localparam int MEMB = 4096;
  logic clk = 0, clk2x = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic [31:0] n_elems = 0, a_base = 0, c_base = 0;
  logic [7:0] b = 0;
  logic a_awvalid, a_awready, a_wvalid, a_wready, a_wlast, a_bvalid, a_bready;
  logic a_arvalid, a_arready, a_rvalid, a_rready, a_rlast;
  logic c_awvalid, c_awready, c_wvalid, c_wready, c_wlast, c_bvalid, c_bready;
  logic c_arvalid, c_arready, c_rvalid, c_rready, c_rlast;
  logic [31:0] a_awaddr, a_araddr, c_awaddr, c_araddr;
  logic [7:0] a_awlen, a_arlen, c_awlen, c_arlen;
  logic [63:0] a_wdata, a_rdata, c_wdata, c_rdata;
  logic [31:0] a_hits, a_misses, c_hits, c_misses, l1_accesses, l1_hits, dsp_ops, kernel_cycles;
  logic simd_mode_two24 = 0, simd_sub = 0;
  logic [47:0] simd_x = 0, simd_y = 0, simd_s;
  logic [3:0] simd_carry;
  logic [3:0] mul4_a [4];
  logic [3:0] mul4_b = 0;
  logic [7:0] mul4_p [4];
  logic flt_in_valid = 0, flt_in_ready, flt_out_valid, flt_out_ready = 0;
  logic [7:0] flt_win [225];
  logic signed [7:0] flt_coef [225];
  logic signed [24:0] flt_out_y;
  logic [31:0] flt_mac_ops;
  longint flt_q[$];
  int flt_in = 0, flt_out = 0, flt_first = 0, flt_last = 0, clk_cyc = 0;
  logic [7:0] a_init [MEMB];
  logic [7:0] c_ref [MEMB];
  int checks = 0, failures = 0;
  int n_stall = 0, n_raw = 0, n_dist = 0, n_cdc [4], n_simd [4], n_ovf = 0;

  always #2 clk2x = ~clk2x;
  always @(posedge clk2x) clk <= ~clk;

  ccc_scal_top dut (
    .clk, .clk2x, .rst_n, .start, .n_elems, .a_base, .c_base, .b, .busy, .done,
    .m_a_awvalid(a_awvalid), .m_a_awready(a_awready), .m_a_awaddr(a_awaddr), .m_a_awlen(a_awlen),
    .m_a_wvalid(a_wvalid), .m_a_wready(a_wready), .m_a_wdata(a_wdata), .m_a_wlast(a_wlast),
    .m_a_bvalid(a_bvalid), .m_a_bready(a_bready),
    .m_a_arvalid(a_arvalid), .m_a_arready(a_arready), .m_a_araddr(a_araddr), .m_a_arlen(a_arlen),
    .m_a_rvalid(a_rvalid), .m_a_rready(a_rready), .m_a_rdata(a_rdata), .m_a_rlast(a_rlast),
    .m_c_awvalid(c_awvalid), .m_c_awready(c_awready), .m_c_awaddr(c_awaddr), .m_c_awlen(c_awlen),
    .m_c_wvalid(c_wvalid), .m_c_wready(c_wready), .m_c_wdata(c_wdata), .m_c_wlast(c_wlast),
    .m_c_bvalid(c_bvalid), .m_c_bready(c_bready),
    .m_c_arvalid(c_arvalid), .m_c_arready(c_arready), .m_c_araddr(c_araddr), .m_c_arlen(c_arlen),
    .m_c_rvalid(c_rvalid), .m_c_rready(c_rready), .m_c_rdata(c_rdata), .m_c_rlast(c_rlast),
    .a_hits, .a_misses, .c_hits, .c_misses, .l1_accesses, .l1_hits, .dsp_ops, .kernel_cycles,
    .simd_mode_two24, .simd_sub, .simd_x, .simd_y, .simd_s, .simd_carry,
    .mul4_a, .mul4_b, .mul4_p,
    .flt_in_valid, .flt_in_ready, .flt_win, .flt_coef, .flt_out_valid, .flt_out_ready,
    .flt_out_y, .flt_mac_ops);

  axi_mem_model #(.BUS_W(64), .MEM_BYTES(MEMB), .LATENCY(6), .STALLS(1)) mem_a (
    .clk, .awvalid(a_awvalid), .awready(a_awready), .awaddr(a_awaddr), .awlen(a_awlen),
    .wvalid(a_wvalid), .wready(a_wready), .wdata(a_wdata), .wlast(a_wlast),
    .bvalid(a_bvalid), .bready(a_bready), .arvalid(a_arvalid), .arready(a_arready),
    .araddr(a_araddr), .arlen(a_arlen), .rvalid(a_rvalid), .rready(a_rready),
    .rdata(a_rdata), .rlast(a_rlast));

  axi_mem_model #(.BUS_W(64), .MEM_BYTES(MEMB), .LATENCY(6), .STALLS(1)) mem_c (
    .clk, .awvalid(c_awvalid), .awready(c_awready), .awaddr(c_awaddr), .awlen(c_awlen),
    .wvalid(c_wvalid), .wready(c_wready), .wdata(c_wdata), .wlast(c_wlast),
    .bvalid(c_bvalid), .bready(c_bready), .arvalid(c_arvalid), .arready(c_arready),
    .araddr(c_araddr), .arlen(c_arlen), .rvalid(c_rvalid), .rready(c_rready),
    .rdata(c_rdata), .rlast(c_rlast));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if ((dut.u_a_cache.rq_valid[0] && !dut.u_a_cache.rq_ready[0]) ||
        (dut.u_c_cache.rq_valid[0] && !dut.u_c_cache.rq_ready[0])) n_stall++;
    if (dut.u_c_cache.u_core.b_valid_q && dut.u_c_cache.u_core.raw_hit) n_raw++;
    if (dut.u_a_rs_cdc.wr_valid && !dut.u_a_rs_cdc.wr_ready) n_ovf++;
    if (dut.u_c_rs_cdc.wr_valid && !dut.u_c_rs_cdc.wr_ready) n_ovf++;
    if (dut.u_a_rq_cdc.rd_valid && dut.u_a_rq_cdc.rd_ready) n_cdc[0]++;
    if (dut.u_c_rq_cdc.rd_valid && dut.u_c_rq_cdc.rd_ready) n_cdc[2]++;
  end
  always @(posedge clk2x) if (rst_n) begin
    if (dut.u_a_rs_cdc.rd_valid && dut.u_a_rs_cdc.rd_ready) n_cdc[1]++;
    if (dut.u_c_rs_cdc.rd_valid && dut.u_c_rs_cdc.rd_ready) n_cdc[3]++;
    if (int'(dut.u_compute.outst_q) == 6) n_dist++;
  end

  // stand-alone packed units: new random operands every compute cycle
  always @(negedge clk2x) begin
    simd_mode_two24 <= 1'($urandom); simd_sub <= 1'($urandom);
    simd_x <= {$urandom, $urandom}; simd_y <= {$urandom, $urandom};
    for (int i = 0; i < 4; i++) mul4_a[i] <= 4'($urandom);
    mul4_b <= 4'($urandom);
  end
  always @(posedge clk2x) begin
    automatic logic [47:0] e;
    for (int l = 0; l < 4; l++) begin
      automatic logic [11:0] x12 = simd_x[12*l +: 12], y12 = simd_y[12*l +: 12];
      e[12*l +: 12] = simd_sub ? x12 - y12 : x12 + y12;
    end
    if (simd_mode_two24)
      for (int l = 0; l < 2; l++) begin
        automatic logic [23:0] x24 = simd_x[24*l +: 24], y24 = simd_y[24*l +: 24];
        e[24*l +: 24] = simd_sub ? x24 - y24 : x24 + y24;
      end
    checks++;
    if (simd_s != e) failures++;
    n_simd[{simd_mode_two24, simd_sub}]++;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (mul4_p[i] != 8'(int'(mul4_a[i]) * int'(signed'(mul4_b)))) failures++;
    end
  end

  // multi-pumped filter task: results are compared in order with a direct sum
  always @(posedge clk) begin
    clk_cyc <= clk_cyc + 1;
    if (flt_out_valid && flt_out_ready) begin
      checks++;
      if (flt_q.size() == 0 || longint'(flt_out_y) != flt_q[0]) begin
        failures++;
        $display("FAIL filter result %0d = %0d", flt_out, flt_out_y);
      end
      if (flt_q.size()) void'(flt_q.pop_front());
      if (flt_out == 0) flt_first <= clk_cyc;
      flt_last <= clk_cyc;
      flt_out <= flt_out + 1;
    end
  end

  task automatic filter_sample();
    longint e = 0;
    for (int i = 0; i < 225; i++) begin
      flt_win[i] = 8'($urandom); flt_coef[i] = 8'($urandom);
      e += longint'(flt_win[i]) * longint'(flt_coef[i]);
    end
    flt_q.push_back(e);
  endtask

  // n samples; full_rate keeps both handshakes open, otherwise both throttle
  task automatic filter_stream(input int n, input bit full_rate);
    int base = flt_out;
    @(negedge clk);
    flt_out_ready = 1;
    for (int k = 0; k < n; k++) begin
      if (!full_rate) while (($urandom % 3) == 0) begin
        flt_out_ready = ($urandom % 4) != 0; @(negedge clk);
      end
      filter_sample(); flt_in_valid = 1;
      do begin
        if (!full_rate) flt_out_ready = ($urandom % 4) != 0;
        @(posedge clk);
      end while (!flt_in_ready);
      flt_in++;
      @(negedge clk);
      flt_in_valid = 0;
    end
    flt_out_ready = 1;
    wait (flt_out == base + n);
    if (full_rate) begin
      checks++;
      if (flt_last - flt_first > n + 8) failures++;
      $display("filter: %0d samples at full rate in %0d cycles", n, flt_last - flt_first + 1);
    end
  endtask

  task automatic kernel(input int n, input int ab, input int cb, input bit do_reset);
    logic [7:0] bb = 8'($urandom);
    int f0 = failures;
    if (do_reset) begin
      @(negedge clk); rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
    end
    for (int i = 0; i < n; i++) c_ref[cb + i] = 8'($signed(a_init[ab + i]) * $signed(bb));
    @(negedge clk2x);
    n_elems = n; a_base = ab; c_base = cb; b = bb;
    start = 1; @(negedge clk2x); start = 0;
    wait (done);
    repeat (4) @(negedge clk);
    for (int i = 0; i < MEMB; i++) begin
      checks += 2;
      if (mem_a.mem[i] != a_init[i]) failures++;
      if (mem_c.mem[i] != c_ref[i]) begin
        failures++;
        if (failures - f0 < 8) $display("FAIL c byte %0d = %0d, expected %0d", i, mem_c.mem[i], c_ref[i]);
      end
    end
    checks++;
    if (dsp_ops != 32'(n / 2)) failures++;
    $display("kernel n=%0d a_base=%0d c_base=%0d: %0d compute cycles, dsp_ops=%0d, a hits/misses %0d/%0d, c hits/misses %0d/%0d, L1 %0d/%0d",
             n, ab, cb, kernel_cycles, dsp_ops, a_hits, a_misses, c_hits, c_misses, l1_hits, l1_accesses);
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin n_cdc[i] = 0; n_simd[i] = 0; mul4_a[i] = 0; end
    for (int i = 0; i < MEMB; i++) begin
      a_init[i] = 8'($urandom); mem_a.mem[i] = a_init[i];
      c_ref[i] = 8'($urandom); mem_c.mem[i] = c_ref[i];
    end
    repeat (4) @(posedge clk);
    rst_n = 1;
    fork
      kernel(256, 0, 2048, 0);
      filter_stream(100, 1);
    join
    kernel(512, 1024, 100, 1);
    fork
      kernel(128, 64, 2052, 0);
      filter_stream(100, 0);
    join
    checks += 18;
    if (flt_out != 200 || flt_q.size() != 0) failures++;
    if (flt_mac_ops != 32'(100 * 225)) failures++;
    if (a_misses == 0) failures++;
    if (c_misses == 0) failures++;
    if (mem_c.wr_bursts == 0) failures++;
    if (n_raw == 0) failures++;
    if (n_stall == 0) failures++;
    if (l1_hits == 0 || l1_hits == l1_accesses) failures++;
    for (int i = 0; i < 4; i++) if (n_cdc[i] == 0) failures++;
    for (int i = 0; i < 4; i++) if (n_simd[i] == 0) failures++;
    if (n_ovf != 0) failures++;
    if (mem_a.errors != 0 || mem_c.errors != 0) failures++;
    $display("mechanisms: stalls=%0d raw_bypass=%0d c_writebacks=%0d a_reads=%0d cdc=%0d/%0d/%0d/%0d distance_limit=%0d simd=%0d/%0d/%0d/%0d fifo_overflow=%0d",
             n_stall, n_raw, mem_c.wr_bursts, mem_a.rd_bursts, n_cdc[0], n_cdc[1], n_cdc[2], n_cdc[3], n_dist,
             n_simd[0], n_simd[1], n_simd[2], n_simd[3], n_ovf);
    $display("filter: %0d results, %0d MACs since the reset", flt_out, flt_mac_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
