// tb_silvia_mul4: exhaustive check of the four-way 4-bit multiplier, with the
// common factor unsigned and signed: every a0..a3 and b combination.
module tb_silvia_mul4;
  logic [3:0] a [4];
  logic [3:0] b;
  logic [7:0] pu [4], ps [4];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  silvia_mul4 #(.B_SIGNED(1'b0)) u_u (.a0(a[0]), .a1(a[1]), .a2(a[2]), .a3(a[3]), .b(b),
                                      .p0(pu[0]), .p1(pu[1]), .p2(pu[2]), .p3(pu[3]));
  silvia_mul4 #(.B_SIGNED(1'b1)) u_s (.a0(a[0]), .a1(a[1]), .a2(a[2]), .a3(a[3]), .b(b),
                                      .p0(ps[0]), .p1(ps[1]), .p2(ps[2]), .p3(ps[3]));

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 20); v++) begin
      {a[0], a[1], a[2], a[3], b} = 20'(v);
      #1;
      for (int i = 0; i < 4; i++) begin
        int eu, es;
        eu = int'(a[i]) * int'(b);
        es = int'(a[i]) * int'(signed'(b));
        checks += 2;
        if (pu[i] != 8'(eu)) begin
          failures++;
          if (failures < 10) $display("FAIL unsigned a%0d=%0d b=%0d got %0d", i, a[i], b, pu[i]);
        end
        if (ps[i] != 8'(es)) begin
          failures++;
          if (failures < 10) $display("FAIL signed a%0d=%0d b=%0d got %0d", i, a[i], signed'(b), signed'(ps[i]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
