// scal_compute: compute task of the scal kernel c[i] = a[i] * b, with packed
// multipliers shared over PUMP cycles (multi-pumping).
//
// The task is the master of two caches. Each iteration handles UNROLL elements:
// it asks the a-cache for the line holding a[i..i+UNROLL-1], multiplies the
// UNROLL words by b and sends UNROLL stores to the c-cache.
//
// Requests and responses are decoupled as the cyclic request/response protocol
// requires: requests for later iterations are issued while earlier responses are
// still in flight, up to DIST outstanding requests (the request-response
// distance), so a pipelined cache returns one line per cycle instead of one per
// round trip. A response is read only when the multiplier stage can take it.
//
// Multiplications use silvia_muladd slices, each forming two 8-bit products
// with the shared factor b. UNROLL/2 pair-products are needed per iteration;
// with a pump factor PUMP the stage runs with an initiation interval of PUMP
// cycles and instantiates only UNROLL/2/PUMP slices, each used once per cycle
// for a different pair. Run in a clock PUMP times faster than the caches, the
// task keeps the single-clock throughput with PUMP times fewer DSPs.
// Results are truncated to DATA_W bits, as storing an int8 product in an int8
// array does. When every store has been sent the task sends OP_STOP to the
// c-cache and raises done when the cache acknowledges that its dirty lines
// reached memory.
//
// Interface: start (one-cycle pulse, with n_elems, bases and b held stable
// while busy), busy, done (high from completion to the next start). n_elems
// must be a multiple of UNROLL and a_base aligned to UNROLL words, LINE_WORDS
// >= UNROLL. The unroll factor of 4, the packed two-product DSP and a pump
// factor of 2 follow the example kernel; the outstanding-request limit as the
// form of the request-response distance, the stage structure and truncation are
// this design's own.
module scal_compute
  import dach_pkg::*;
#(
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_WORDS = 16,
  parameter int unsigned UNROLL     = 4,
  parameter int unsigned PUMP       = 2,
  parameter int unsigned DIST       = 6,
  localparam int unsigned LINE_W    = LINE_WORDS * DATA_W,
  localparam int unsigned NPAIR     = UNROLL / 2,
  localparam int unsigned NDSP      = NPAIR / PUMP
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [31:0]       n_elems,
  input  logic [ADDR_W-1:0] a_base,
  input  logic [ADDR_W-1:0] c_base,
  input  logic [DATA_W-1:0] b,
  output logic              busy,
  output logic              done,
  // a-cache (loads)
  output logic              a_rq_valid,
  input  logic              a_rq_ready,
  output logic [ADDR_W-1:0] a_rq_addr,
  input  logic              a_rs_valid,
  output logic              a_rs_ready,
  input  logic [LINE_W-1:0] a_rs_line,
  // c-cache (stores and stop)
  output logic              c_rq_valid,
  input  logic              c_rq_ready,
  output cache_op_e         c_rq_op,
  output logic [ADDR_W-1:0] c_rq_addr,
  output logic [DATA_W-1:0] c_rq_wdata,
  input  logic              c_rs_valid,
  output logic              c_rs_ready,
  // profiling
  output logic [31:0]       dsp_ops,
  output logic [31:0]       cycles
);
  localparam int unsigned KW = (PUMP <= 1) ? 1 : $clog2(PUMP);
  localparam int unsigned JW = $clog2(UNROLL);
  localparam int unsigned DW = $clog2(DIST + 1);

  initial begin
    assert (UNROLL % 2 == 0 && NPAIR % PUMP == 0 && LINE_WORDS >= UNROLL && DATA_W <= 9)
      else $error("scal_compute: UNROLL/2 must be a multiple of PUMP, LINE_WORDS >= UNROLL");
  end

  logic [31:0] n_iter_q, iss_q, cons_q, st_iter_q;
  logic [DW-1:0] outst_q;
  logic        run_q, stop_sent_q;

  // ---------------------------------------------------------- request issue
  logic a_fire, a_take;
  assign a_rq_valid = run_q && iss_q < n_iter_q && outst_q < DW'(DIST);
  assign a_rq_addr  = a_base + ADDR_W'(iss_q) * ADDR_W'(UNROLL);
  assign a_fire     = a_rq_valid && a_rq_ready;

  // ---------------------------------------------------------- multiplier stage
  logic              mul_busy_q;
  logic [KW-1:0]     k_q;
  logic [DATA_W-1:0] x_q    [UNROLL];
  logic [DATA_W-1:0] prod_q [UNROLL];
  logic [DATA_W-1:0] prod_n [UNROLL];
  logic              mul_last, mul_fin, st_free;

  logic signed [DATA_W-1:0] dsp_hi [NDSP];
  logic signed [DATA_W-1:0] dsp_lo [NDSP];
  logic signed [47:0]       dsp_p  [NDSP];
  logic signed [17:0]       res_hi [NDSP];
  logic signed [17:0]       res_lo [NDSP];

  for (genvar d = 0; d < NDSP; d++) begin : g_dsp
    silvia_muladd #(.W(DATA_W)) u_mad (
      .x_hi(dsp_hi[d]), .x_lo(dsp_lo[d]), .w(b), .pcin(48'sd0), .pout(dsp_p[d])
    );
    silvia_muladd_extract u_ext (.p(dsp_p[d]), .sum_hi(res_hi[d]), .sum_lo(res_lo[d]));
  end

  // slot k uses slice d for pair k*NDSP + d
  always_comb begin
    for (int d = 0; d < NDSP; d++) begin
      dsp_hi[d] = x_q[2*(int'(k_q) * NDSP + d) + 1];
      dsp_lo[d] = x_q[2*(int'(k_q) * NDSP + d)];
    end
  end

  always_comb begin
    prod_n = prod_q;
    for (int d = 0; d < NDSP; d++) begin
      prod_n[2*(int'(k_q) * NDSP + d)]     = DATA_W'(res_lo[d]);
      prod_n[2*(int'(k_q) * NDSP + d) + 1] = DATA_W'(res_hi[d]);
    end
  end

  logic              st_busy_q;
  logic [JW-1:0]     st_j_q;
  logic [DATA_W-1:0] st_buf_q [UNROLL];
  logic              st_last;

  assign st_last  = st_busy_q && c_rq_ready && st_j_q == JW'(UNROLL - 1);
  assign st_free  = !st_busy_q || st_last;
  assign mul_last = mul_busy_q && int'(k_q) == PUMP - 1;
  assign mul_fin  = mul_last && st_free;
  assign a_take   = a_rs_valid && (!mul_busy_q || mul_fin);
  assign a_rs_ready = a_take;

  // ---------------------------------------------------------- store issue
  logic stop_phase;
  assign stop_phase = run_q && !st_busy_q && !mul_busy_q && st_iter_q == n_iter_q;
  always_comb begin
    c_rq_valid = 1'b0;
    c_rq_op    = OP_STORE;
    c_rq_addr  = c_base + ADDR_W'(st_iter_q) * ADDR_W'(UNROLL) + ADDR_W'(st_j_q);
    c_rq_wdata = st_buf_q[st_j_q];
    if (st_busy_q) begin
      c_rq_valid = 1'b1;
    end else if (stop_phase && !stop_sent_q) begin
      c_rq_valid = 1'b1;
      c_rq_op    = OP_STOP;
    end
  end
  assign c_rs_ready = 1'b1;
  assign busy = run_q;

  // ---------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0; done <= 1'b0; stop_sent_q <= 1'b0;
      n_iter_q <= '0; iss_q <= '0; cons_q <= '0; st_iter_q <= '0; outst_q <= '0;
      mul_busy_q <= 1'b0; k_q <= '0; st_busy_q <= 1'b0; st_j_q <= '0;
      dsp_ops <= '0; cycles <= '0;
      for (int j = 0; j < UNROLL; j++) begin
        x_q[j] <= '0; prod_q[j] <= '0; st_buf_q[j] <= '0;
      end
    end else begin
      if (start && !run_q) begin
        run_q <= 1'b1; done <= 1'b0; stop_sent_q <= 1'b0;
        n_iter_q <= n_elems / UNROLL;
        iss_q <= '0; cons_q <= '0; st_iter_q <= '0; outst_q <= '0;
        cycles <= '0; dsp_ops <= '0;
      end
      if (run_q) cycles <= cycles + 1'b1;

      if (a_fire) iss_q <= iss_q + 1'b1;
      case ({a_fire, a_take})
        2'b10: outst_q <= outst_q + 1'b1;
        2'b01: outst_q <= outst_q - 1'b1;
        default: ;
      endcase

      // multiplier stage
      if (mul_busy_q) begin
        if (!mul_last || mul_fin) dsp_ops <= dsp_ops + NDSP;
        prod_q  <= prod_n;
        if (!mul_last) k_q <= k_q + 1'b1;
      end
      if (mul_fin) begin
        mul_busy_q <= 1'b0;
        k_q        <= '0;
      end
      if (a_take) begin
        for (int j = 0; j < UNROLL; j++)
          x_q[j] <= a_rs_line[((int'(a_base % ADDR_W'(LINE_WORDS)) + int'(cons_q) * UNROLL + j) % LINE_WORDS) * DATA_W +: DATA_W];
        cons_q     <= cons_q + 1'b1;
        mul_busy_q <= 1'b1;
        k_q        <= '0;
      end

      // store stage
      if (st_busy_q && c_rq_ready) begin
        st_j_q <= st_j_q + 1'b1;
        if (st_last) begin
          st_busy_q <= 1'b0;
          st_j_q    <= '0;
          st_iter_q <= st_iter_q + 1'b1;
        end
      end
      if (mul_fin) begin
        st_busy_q <= 1'b1;
        st_j_q    <= '0;
        st_buf_q  <= prod_n;
      end

      // stop and completion
      if (stop_phase && !stop_sent_q && c_rq_ready) stop_sent_q <= 1'b1;
      if (run_q && stop_sent_q && c_rs_valid) begin
        run_q <= 1'b0;
        done  <= 1'b1;
      end
    end
  end
endmodule
