// mpump_filter2d: multi-pumped 2D-filter task: one 15 x 15 window times a
// 15 x 15 coefficient set per sample, computed with a shared multiplier bank.
//
// Each sample needs N_OP multiply-accumulates (225 for a 15 x 15 window). The
// task runs with an initiation interval of PUMP cycles and instantiates only
// NMUL = ceil(N_OP / PUMP) multipliers: in slot s of a sample, multiplier m
// handles element s*NMUL + m, and an adder tree sums the slot's products into
// the accumulator. Placed in a clock domain PUMP times faster than its
// neighbours, the task delivers one result per neighbour cycle, the same
// throughput as a single-clock task with N_OP multipliers.
//
// Interface: a sample (win, coef) is taken with in_valid/in_ready; the result
// leaves on out_valid/out_ready one sample period later; a result that is not
// taken holds the task in its last slot. Pixels are unsigned, coefficients
// signed, the result signed and wide enough for N_OP full-scale products.
// mac_ops counts the multiply-accumulates done (N_OP per sample).
//
// The 225 operations, the II of 2 and the ceil(225/2) = 113 shared multipliers
// follow the multi-pumped filter example; the operand types and widths, the
// adder tree and the handshake are this design's choices.
module mpump_filter2d #(
  parameter int unsigned W      = 8,
  parameter int unsigned N_OP   = 225,
  parameter int unsigned PUMP   = 2,
  localparam int unsigned NMUL  = (N_OP + PUMP - 1) / PUMP,
  localparam int unsigned ACC_W = 2 * W + 1 + $clog2(N_OP)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic        [W-1:0]     win  [N_OP],
  input  logic signed [W-1:0]     coef [N_OP],
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [ACC_W-1:0] out_y,
  output logic        [31:0]      mac_ops
);
  localparam int unsigned SW = (PUMP <= 1) ? 1 : $clog2(PUMP);

  logic                    busy_q;
  logic [SW-1:0]           slot_q;
  logic        [W-1:0]     win_q  [N_OP];
  logic signed [W-1:0]     coef_q [N_OP];
  logic signed [ACC_W-1:0] acc_q, acc_n, part;
  logic                    last, fin;

  // the shared multiplier bank and its adder tree
  always_comb begin
    part = '0;
    for (int m = 0; m < NMUL; m++) begin
      automatic int unsigned e = int'(slot_q) * NMUL + m;
      if (e < N_OP)
        part += ACC_W'(signed'({1'b0, win_q[e]}) * coef_q[e]);
    end
    acc_n = ((slot_q == '0) ? ACC_W'(0) : acc_q) + part;
  end

  assign last     = busy_q && int'(slot_q) == PUMP - 1;
  assign fin      = last && (!out_valid || out_ready);
  assign in_ready = !busy_q || fin;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      win_q  <= win;
      coef_q <= coef;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      slot_q    <= '0;
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_y     <= '0;
      mac_ops   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (busy_q && (!last || fin)) begin
        acc_q   <= acc_n;
        mac_ops <= mac_ops + (last ? 32'(N_OP - (PUMP - 1) * NMUL) : 32'(NMUL));
        if (!last) slot_q <= slot_q + 1'b1;
      end
      if (fin) begin
        out_valid <= 1'b1;
        out_y     <= acc_n;
        busy_q    <= 1'b0;
        slot_q    <= '0;
      end
      if (in_valid && in_ready) begin
        busy_q <= 1'b1;
        slot_q <= '0;
      end
    end
  end
endmodule
