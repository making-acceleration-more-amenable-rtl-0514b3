// tb_f2d_harness: one configuration of the multi-pumped filter task under
// test. It streams NS random samples (with full-scale corner cases) and compares
// every result with a direct N-term sum. In the first half both handshakes stay
// open and a result must leave every PUMP cycles; in the second half input and
// output are throttled at random. The MAC counter must read N per sample.
module tb_f2d_harness #(
  parameter int W = 8,
  parameter int N = 225,
  parameter int PUMP = 2,
  parameter int NS = 400
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int ACC_W = 2 * W + 1 + $clog2(N);

  logic                    in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic        [W-1:0]     win  [N];
  logic signed [W-1:0]     coef [N];
  logic signed [ACC_W-1:0] out_y;
  logic [31:0]             mac_ops;

  mpump_filter2d #(.W(W), .N_OP(N), .PUMP(PUMP)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .win, .coef,
    .out_valid, .out_ready, .out_y, .mac_ops);

  longint exp_q[$];
  int     n_in = 0, n_out = 0, last_out = -1, cyc = 0, phase = 0;
  int     gaps_ok = 0;

  task automatic new_sample(int k);
    longint e = 0;
    for (int i = 0; i < N; i++) begin
      win[i]  = W'($urandom);
      coef[i] = W'($urandom);
      if (k % 37 == 5)  begin win[i] = '1; coef[i] = {1'b1, {(W-1){1'b0}}}; end
      if (k % 37 == 11) begin win[i] = '1; coef[i] = {1'b0, {(W-1){1'b1}}}; end
      e += longint'(win[i]) * longint'(coef[i]);
    end
    exp_q.push_back(e);
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || longint'(out_y) != exp_q[0]) begin
        failures++;
        $display("PUMP=%0d result %0d: got %0d expected %0d", PUMP, n_out, out_y,
                 exp_q.size() ? exp_q[0] : 0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
      if (phase == 0 && last_out >= 0) begin
        checks++;
        if (cyc - last_out != PUMP) failures++; else gaps_ok++;
      end
      last_out <= cyc;
      n_out <= n_out + 1;
    end
  end

  initial begin
    checks = 0; failures = 0; finished = 0;
    wait (rst_n);
    // phase 0: open handshakes, one sample per PUMP cycles
    @(negedge clk);
    out_ready = 1;
    new_sample(n_in); in_valid = 1;
    while (n_in < NS / 2) begin
      @(posedge clk);
      if (in_ready) begin
        n_in++;
        @(negedge clk);
        if (n_in < NS / 2) new_sample(n_in); else in_valid = 0;
      end else @(negedge clk);
    end
    wait (n_out == NS / 2);
    @(negedge clk);
    phase = 1;
    // phase 1: random input gaps and output stalls
    fork
      begin
        while (n_in < NS) begin
          in_valid = ($urandom % 3) != 0;
          if (in_valid) new_sample(n_in);
          while (in_valid) begin
            @(posedge clk);
            if (in_ready) begin n_in++; @(negedge clk); in_valid = 0; end
            else @(negedge clk);
          end
        end
      end
      forever begin
        @(negedge clk);
        out_ready = ($urandom % 4) != 0;
      end
    join_any
    wait (n_out == NS);
    repeat (5) @(posedge clk);
    checks++;
    if (mac_ops != 32'(NS * N)) begin
      failures++;
      $display("mac_ops %0d expected %0d", mac_ops, NS * N);
    end
    checks++;
    if (gaps_ok != NS / 2 - 1) failures++;
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("W=%0d N=%0d PUMP=%0d: %0d multipliers, samples %0d, mac_ops %0d, full-rate gaps %0d",
             W, N, PUMP, (N + PUMP - 1) / PUMP, n_out, mac_ops, gaps_ok);
    finished = 1;
  end
endmodule
