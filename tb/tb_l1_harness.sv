// tb_l1_harness: one configuration of the private L1 on a behavioural L2
// port, driven by tb_dach_l1. The L2 model answers each line request after a
// random delay with an L2 line whose words are a fixed function of their
// address. Every response is compared with the expected L1 line, in request
// order. A reference set-associative tag array with FIFO replacement predicts
// hits; the hit counter must match it and, while the consumer is always ready
// (first half), a predicted hit must be answered exactly one cycle after it is
// accepted. Hits, misses and consumer back-pressure must all occur.
module tb_l1_harness #(
  parameter int SETS = 4,
  parameter int WAYS = 1,
  parameter int LWD = 16,
  parameter int L2LWD = 16,
  parameter int NREQ = 6000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int DW = 8, AW = 32, LW = LWD*DW, L2LW = L2LWD*DW;
  logic rqv, rqr, rsv, rsr, l2v, l2r, l2sv, l2sr;
  logic [AW-1:0] rqa, l2a;
  logic [LW-1:0] rsl;
  logic [L2LW-1:0] l2sl;
  logic [31:0] accesses, hits;
  int issued = 0, pred_hits = 0, n_bp = 0, n_miss = 0;
  logic [AW-1:0] exp_q [$];
  logic [AW-1:0] rtag [SETS][WAYS];
  logic rvld [SETS][WAYS];
  int rptr [SETS];
  bit phase_lat = 1, hit_due = 0;

  dach_l1 #(.DATA_W(DW), .ADDR_W(AW), .LINE_WORDS(LWD), .SETS(SETS), .WAYS(WAYS), .L2_LINE_WORDS(L2LWD)) dut (
    .clk, .rst_n, .rq_valid(rqv), .rq_ready(rqr), .rq_addr(rqa),
    .rs_valid(rsv), .rs_ready(rsr), .rs_line(rsl),
    .l2_rq_valid(l2v), .l2_rq_ready(l2r), .l2_rq_addr(l2a),
    .l2_rs_valid(l2sv), .l2_rs_ready(l2sr), .l2_rs_line(l2sl), .accesses, .hits);

  function automatic logic [LW-1:0] line_of(logic [AW-1:0] a);
    logic [LW-1:0] l;
    for (int i = 0; i < LWD; i++) l[DW*i +: DW] = DW'(((a / LWD) * LWD + i) * 37 + 11);
    return l;
  endfunction


  // behavioural L2 port: accept a line request, answer after 1..8 cycles
  initial begin
    l2r = 0; l2sv = 0; l2sl = '0;
    forever begin
      @(negedge clk);
      l2r = ($urandom_range(0, 2) != 0);
      if (l2v && l2r) begin
        automatic logic [AW-1:0] a = l2a;
        @(negedge clk); l2r = 0;
        repeat ($urandom_range(0, 7)) @(negedge clk);
        l2sv = 1;
        for (int i = 0; i < L2LWD; i++) l2sl[DW*i +: DW] = DW'(((a / L2LWD) * L2LWD + i) * 37 + 11);
        do @(posedge clk); while (!l2sr);
        @(negedge clk); l2sv = 0;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (rsv && rsr) begin
      checks++;
      if (exp_q.size() == 0 || rsl != line_of(exp_q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL response line");
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    if (rsv && !rsr) n_bp++;
    if (phase_lat) begin
      if (hit_due) begin checks++; if (!rsv) failures++; end
    end
    hit_due = 0;
    if (rqv && rqr) begin
      automatic int s = int'((rqa / LWD) % SETS);
      automatic bit h = 0;
      exp_q.push_back(rqa);
      for (int w = 0; w < WAYS; w++) if (rvld[s][w] && rtag[s][w] == rqa / LWD) h = 1;
      if (h) begin pred_hits++; hit_due = 1; end
      else begin
        n_miss++;
        rvld[s][rptr[s]] = 1; rtag[s][rptr[s]] = rqa / LWD;
        rptr[s] = (rptr[s] + 1) % WAYS;
      end
    end
  end

  // consumer back-pressure, only in the second half
  always @(negedge clk) rsr <= phase_lat ? 1'b1 : ($urandom_range(0, 3) != 0);

  initial begin
    rqv = 0; rqa = 0;
    checks = 0; failures = 0; finished = 0;
    for (int s = 0; s < SETS; s++) begin
      rptr[s] = 0;
      for (int w = 0; w < WAYS; w++) rvld[s][w] = 0;
    end
    wait (rst_n);
    while (issued < NREQ) begin
      @(negedge clk);
      if (issued == NREQ / 2) phase_lat = 0;
      rqv = 1;
      rqa = (($urandom_range(0, 9) == 0) ? $urandom_range(0, 4095) : $urandom_range(0, 2 * WAYS * SETS * LWD + SETS * LWD - 1));
      do @(posedge clk); while (!rqr);
      issued++;
      @(negedge clk); rqv = 0;
      if ($urandom_range(0, 1)) @(negedge clk);
    end
    phase_lat = 1;
    repeat (40) @(posedge clk);
    checks += 5;
    if (exp_q.size() != 0) failures++;
    if (accesses != NREQ) failures++;
    if (hits != pred_hits) failures++;
    if (n_miss == 0 || pred_hits == 0) failures++;
    if (n_bp == 0) failures++;
    $display("L1 SETS=%0d WAYS=%0d LINE=%0d L2 LINE=%0d: accesses=%0d hits=%0d predicted=%0d misses=%0d backpressure=%0d",
             SETS, WAYS, LWD, L2LWD, accesses, hits, pred_hits, n_miss, n_bp);
    finished = 1;
  end
endmodule
