// tb_wl_silvia: three of the packed-arithmetic benchmark kernels computed on
// the packed DSP units, with the testbench as the loop control.
//  - Matrix-vector product y = M v, 192 x 192, int8: each step feeds a chain
//    of three silvia_muladd slices with rows r and r+1 of three columns
//    against the shared vector elements (a chain length of 3), so one chain
//    step yields two partial dot products of three terms each.
//  - Matrix product C = A B on 4-bit unsigned integers, reduced to 32 x 32 x 32:
//    silvia_mul4 forms A[i][k] * B[k][j..j+3] at once (shared factor A[i][k]).
//  - Vector addition of two 192-element 8-bit vectors: silvia_add_simd in
//    four-lane mode adds four element pairs per operation.
//  - axpy p_i = alpha * x_i + y_i on 512-element int8 vectors: one
//    silvia_muladd slice forms alpha * x_i and alpha * x_(i+1) at once (shared
//    factor alpha), and y_i is added outside the DSP, since the packed adder
//    can only sum packed products.
// Every result is compared with a plain reference computation.
module tb_wl_silvia;
  localparam int NV = 192, NM = 32, NX = 512;
  int checks = 0, failures = 0;

  // MVM chain of three slices
  logic signed [7:0] xh [3], xl [3], wv [3];
  logic signed [47:0] pc [4];
  logic signed [17:0] s_hi, s_lo;
  assign pc[0] = '0;
  for (genvar g = 0; g < 3; g++) begin : g_chain
    silvia_muladd #(.W(8)) u (.x_hi(xh[g]), .x_lo(xl[g]), .w(wv[g]), .pcin(pc[g]), .pout(pc[g+1]));
  end
  silvia_muladd_extract u_ext (.p(pc[3]), .sum_hi(s_hi), .sum_lo(s_lo));

  // 4-bit MMM
  logic [3:0] ma [4];
  logic [3:0] mb;
  logic [7:0] mp [4];
  silvia_mul4 #(.B_SIGNED(1'b0)) u_mul4 (.a0(ma[0]), .a1(ma[1]), .a2(ma[2]), .a3(ma[3]), .b(mb),
    .p0(mp[0]), .p1(mp[1]), .p2(mp[2]), .p3(mp[3]));

  // axpy: a single packed slice
  logic signed [7:0] ax_hi, ax_lo, alpha;
  logic signed [47:0] ax_p;
  logic signed [17:0] ax_hi_s, ax_lo_s;
  silvia_muladd #(.W(8)) u_axpy (.x_hi(ax_hi), .x_lo(ax_lo), .w(alpha), .pcin(48'sd0), .pout(ax_p));
  silvia_muladd_extract u_axpy_ext (.p(ax_p), .sum_hi(ax_hi_s), .sum_lo(ax_lo_s));
  logic signed [7:0] xv [NX], yv [NX];

  // vector add
  logic [47:0] vx, vy, vs;
  logic [3:0] vc;
  silvia_add_simd u_add (.mode_two24(1'b0), .sub(1'b0), .x(vx), .y(vy), .s(vs), .carry(vc));

  logic signed [7:0] m [NV][NV];
  logic signed [7:0] v [NV];
  logic [3:0] a4 [NM][NM];
  logic [3:0] b4 [NM][NM];
  logic [7:0] va [NV], vb [NV];

  initial begin
    for (int i = 0; i < NV; i++) begin
      v[i] = 8'($urandom); va[i] = 8'($urandom); vb[i] = 8'($urandom);
      for (int j = 0; j < NV; j++) m[i][j] = 8'($urandom);
    end
    for (int i = 0; i < NM; i++) for (int j = 0; j < NM; j++) begin a4[i][j] = 4'($urandom); b4[i][j] = 4'($urandom); end

    // MVM: rows in pairs, columns in groups of three
    for (int r = 0; r < NV; r += 2) begin
      int acc_hi, acc_lo, ref_hi, ref_lo;
      acc_hi = 0; acc_lo = 0; ref_hi = 0; ref_lo = 0;
      for (int k = 0; k < NV; k += 3) begin
        for (int g = 0; g < 3; g++) begin xh[g] = m[r+1][k+g]; xl[g] = m[r][k+g]; wv[g] = v[k+g]; end
        #1;
        acc_hi += int'(s_hi); acc_lo += int'(s_lo);
      end
      for (int k = 0; k < NV; k++) begin ref_hi += int'(m[r+1][k]) * int'(v[k]); ref_lo += int'(m[r][k]) * int'(v[k]); end
      checks += 2;
      if (acc_hi != ref_hi) failures++;
      if (acc_lo != ref_lo) failures++;
    end

    // 4-bit MMM: four output columns per multiplier operation
    for (int i = 0; i < NM; i++)
      for (int j = 0; j < NM; j += 4) begin
        int acc [4];
        for (int n = 0; n < 4; n++) acc[n] = 0;
        for (int k = 0; k < NM; k++) begin
          mb = a4[i][k];
          for (int n = 0; n < 4; n++) ma[n] = b4[k][j+n];
          #1;
          for (int n = 0; n < 4; n++) acc[n] += int'(mp[n]);
        end
        for (int n = 0; n < 4; n++) begin
          int r4;
          r4 = 0;
          for (int k = 0; k < NM; k++) r4 += int'(a4[i][k]) * int'(b4[k][j+n]);
          checks++;
          if (acc[n] != r4) failures++;
        end
      end

    // vector add: four 8-bit element pairs per operation in 12-bit lanes
    for (int i = 0; i < NV; i += 4) begin
      for (int n = 0; n < 4; n++) begin vx[12*n +: 12] = 12'(va[i+n]); vy[12*n +: 12] = 12'(vb[i+n]); end
      #1;
      for (int n = 0; n < 4; n++) begin
        checks++;
        if (vs[12*n +: 12] != 12'(va[i+n]) + 12'(vb[i+n])) failures++;
      end
    end

    // axpy: two elements per DSP operation, y added outside
    alpha = 8'($urandom);
    for (int i = 0; i < NX; i++) begin xv[i] = 8'($urandom); yv[i] = 8'($urandom); end
    xv[0] = -128; xv[1] = -128; alpha = (alpha == 0) ? 8'sd1 : alpha;
    for (int i = 0; i < NX; i += 2) begin
      int p0, p1;
      ax_lo = xv[i]; ax_hi = xv[i+1];
      #1;
      p0 = int'(ax_lo_s) + int'(yv[i]);
      p1 = int'(ax_hi_s) + int'(yv[i+1]);
      checks += 2;
      if (p0 != int'(alpha) * int'(xv[i]) + int'(yv[i])) failures++;
      if (p1 != int'(alpha) * int'(xv[i+1]) + int'(yv[i+1])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
