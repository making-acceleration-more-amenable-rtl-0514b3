// tb_silvia_muladd: checks the packed two-MAD DSP slice and the extractor.
// A chain of seven slices (the longest chain that cannot overflow for signed
// 8-bit factors) is fed random and extreme factors; each prefix of the chain is
// extracted and compared with the two sums computed directly.
module tb_silvia_muladd;
  localparam int N = 7;
  logic signed [7:0]  xh [N], xl [N], w [N];
  logic signed [47:0] p  [N+1];
  logic signed [17:0] sh [N], sl [N];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  assign p[0] = '0;
  for (genvar i = 0; i < N; i++) begin : g
    silvia_muladd #(.W(8)) u_m (.x_hi(xh[i]), .x_lo(xl[i]), .w(w[i]), .pcin(p[i]), .pout(p[i+1]));
    silvia_muladd_extract u_e (.p(p[i+1]), .sum_hi(sh[i]), .sum_lo(sl[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eh, el;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < N; i++) begin
        case (t % 4)
          0: begin xh[i] = -128; xl[i] = -128; w[i] = -128; end
          1: begin xh[i] = 127;  xl[i] = -128; w[i] = -128; end
          default: begin xh[i] = 8'($urandom); xl[i] = 8'($urandom); w[i] = 8'($urandom); end
        endcase
      end
      #1;
      eh = 0; el = 0;
      for (int i = 0; i < N; i++) begin
        eh += int'(xh[i]) * int'(w[i]);
        el += int'(xl[i]) * int'(w[i]);
        checks++;
        if (int'(sh[i]) != eh || int'(sl[i]) != el) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d len=%0d got %0d,%0d exp %0d,%0d", t, i+1, sh[i], sl[i], eh, el);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
