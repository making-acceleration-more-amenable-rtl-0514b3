// tb_silvia_add_simd: random and carry-edge operands in both lane modes, adding
// and subtracting; each lane is compared with its own sum and carry-out.
module tb_silvia_add_simd;
  logic mode, sub;
  logic [47:0] x, y, s;
  logic [3:0]  c;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  silvia_add_simd dut (.mode_two24(mode), .sub(sub), .x(x), .y(y), .s(s), .carry(c));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      mode = t[0]; sub = t[1];
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      if (t % 7 == 0) begin x = '1; y = 48'h000001000001; end
      #1;
      if (!mode) begin
        for (int i = 0; i < 4; i++) begin
          logic [12:0] e;
          e = sub ? {1'b0, x[12*i +: 12]} + {1'b0, ~y[12*i +: 12]} + 13'd1
                  : {1'b0, x[12*i +: 12]} + {1'b0, y[12*i +: 12]};
          checks++;
          if (s[12*i +: 12] != e[11:0] || c[i] != e[12]) failures++;
        end
      end else begin
        for (int i = 0; i < 2; i++) begin
          logic [24:0] e;
          e = sub ? {1'b0, x[24*i +: 24]} + {1'b0, ~y[24*i +: 24]} + 25'd1
                  : {1'b0, x[24*i +: 24]} + {1'b0, y[24*i +: 24]};
          checks++;
          if (s[24*i +: 24] != e[23:0] || c[i] != e[24]) failures++;
        end
        checks++;
        if (c[3:2] != 2'b00) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
