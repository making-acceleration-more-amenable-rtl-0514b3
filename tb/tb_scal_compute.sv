// tb_scal_compute: the scal compute task with default parameters between two
// behavioural caches. The a-cache model accepts line requests with random
// ready, keeps them in order and answers each after a random delay, holding the
// response until it is taken. The c-cache model accepts stores with random
// ready into an array and answers OP_STOP with an acknowledgement. Several runs
// with random b, lengths and bases check every c element against a[i]*b
// truncated to 8 bits, that no store falls outside c, that the stop comes after
// the last store, the DSP operation count (UNROLL/2 per iteration) and, in a run
// with ideal caches, the throughput of one iteration per UNROLL cycles. The
// request-response distance limit, response stalls and store back-pressure
// must all be exercised.
module tb_scal_compute;
  import dach_pkg::*;
  localparam int DW = 8, AW = 32, LWD = 16, UNROLL = 4, PUMP = 2, DIST = 6, LW = LWD*DW;
  localparam int MEMW = 4096;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [31:0] n_elems, dsp_ops, cycles;
  logic [AW-1:0] a_base, c_base;
  logic [DW-1:0] b;
  logic arv, arr, asv, asr, crv, crr, csv, csr;
  logic [AW-1:0] ara, cra;
  logic [LW-1:0] asl;
  cache_op_e crop;
  logic [DW-1:0] crwd;
  logic [7:0] amem [MEMW];
  logic [7:0] cmem [MEMW];
  logic [AW-1:0] aq [$];
  int checks = 0, failures = 0, stores = 0, n_dist = 0, n_stall = 0, n_bp = 0;
  bit ideal = 0, stopped = 0;
  always #5 clk = ~clk;

  scal_compute #(.DATA_W(DW), .ADDR_W(AW), .LINE_WORDS(LWD), .UNROLL(UNROLL), .PUMP(PUMP), .DIST(DIST)) dut (
    .clk, .rst_n, .start, .n_elems, .a_base, .c_base, .b, .busy, .done,
    .a_rq_valid(arv), .a_rq_ready(arr), .a_rq_addr(ara), .a_rs_valid(asv), .a_rs_ready(asr), .a_rs_line(asl),
    .c_rq_valid(crv), .c_rq_ready(crr), .c_rq_op(crop), .c_rq_addr(cra), .c_rq_wdata(crwd),
    .c_rs_valid(csv), .c_rs_ready(csr), .dsp_ops, .cycles);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a-cache model: requests queue up, responses come in order after a delay
  always @(negedge clk) arr <= ideal ? 1'b1 : ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n) begin
    if (arv && !arr) ; else if (arv && arr) aq.push_back(ara);
    if (int'(dut.outst_q) == DIST) n_dist++;
  end
  initial begin
    asv = 0; asl = '0;
    forever begin
      @(negedge clk);
      if (aq.size() != 0) begin
        automatic logic [AW-1:0] a = aq.pop_front();
        if (!ideal) repeat ($urandom_range(0, 3)) @(negedge clk);
        asv = 1;
        for (int i = 0; i < LWD; i++) asl[8*i +: 8] = amem[(a / LWD) * LWD + i];
        @(posedge clk);
        while (!asr) begin n_stall++; @(posedge clk); end
        #1 asv = 0;
      end
    end
  end

  // c-cache model
  always @(negedge clk) crr <= ideal ? 1'b1 : ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n) begin
    if (crv && !crr) n_bp++;
    if (crv && crr) begin
      if (crop == OP_STORE) begin
        stores++;
        if (stopped || cra < c_base || cra >= c_base + n_elems) begin
          failures++;
          if (failures < 10) $display("FAIL store outside c at %0d", cra);
        end else cmem[cra] = crwd;
      end else if (crop == OP_STOP) stopped = 1;
    end
  end
  initial begin
    csv = 0;
    forever begin
      @(negedge clk);
      if (stopped && busy) begin
        repeat ($urandom_range(0, 5)) @(negedge clk);
        csv = 1; @(negedge clk); csv = 0;
        wait (!busy);
      end
    end
  end

  task automatic run(input int n, input int ab, input int cb, input bit id);
    ideal = id; stopped = 0; stores = 0;
    for (int i = 0; i < MEMW; i++) cmem[i] = 8'hxx ^ 8'h5a;
    @(negedge clk);
    n_elems = n; a_base = ab; c_base = cb; b = 8'($urandom);
    start = 1; @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      checks++;
      if (cmem[cb + i] != 8'($signed(amem[ab + i]) * $signed(b))) begin
        failures++;
        if (failures < 10) $display("FAIL c[%0d] = %0d, a = %0d, b = %0d", i, cmem[cb + i], amem[ab + i], b);
      end
    end
    checks += 3;
    if (stores != n) failures++;
    if (dsp_ops != 32'(n / UNROLL * (UNROLL / 2))) failures++;
    if (id && cycles > 32'(n + 20)) begin
      failures++;
      $display("FAIL throughput: %0d cycles for %0d elements", cycles, n);
    end
    $display("run n=%0d ideal=%0d cycles=%0d dsp_ops=%0d", n, id, cycles, dsp_ops);
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
  endtask

  initial begin
    start = 0; n_elems = 0; a_base = 0; c_base = 0; b = 0;
    for (int i = 0; i < MEMW; i++) amem[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(256, 0, 2048, 1);
    for (int r = 0; r < 12; r++)
      run(4 * $urandom_range(1, 200), 4 * $urandom_range(0, 255), 2048 + $urandom_range(0, 1000), 0);
    checks += 3;
    if (n_dist == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_bp == 0) failures++;
    $display("distance limit hit=%0d response stalls=%0d store back-pressure=%0d", n_dist, n_stall, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
