// silvia_mul4: four 4-bit unsigned factors times one common 4-bit factor on a
// single DSP multiplier plus a little LUT logic.
//
// Each 4x4 product needs 8 result bits. The 27-bit multiplier input holds
// a0, a1, a2, each followed by four zero bits, and then only the three upper bits
// of a3:  {a0, 0000, a1, 0000, a2, 0000, a3[3:1]}  (4+4+4+4+4+4+3 = 27 bits).
// Multiplying by b places p0 in bits 30:23, p1 in 22:15, p2 in 14:7 and
// a3[3:1]*b in bits 6:0 of the product. The last product is completed outside
// the DSP:  p3 = (a3[3:1]*b)*2 + a3[0]*b,  a shift, an AND of b with a3[0] and a
// small adder. When b is signed (B_SIGNED = 1) each product field that is
// negative has borrowed one from the field above it, so each field is corrected
// by adding the sign bit of the field below it.
//
// Interface: a0..a3 unsigned 4-bit, b 4-bit (signed when B_SIGNED), p0..p3
// 8-bit results (signed when B_SIGNED). Combinational. The bit mapping and the
// p3 completion follow the packing method; the correction chain order (p3's
// field corrects p2, p2's corrects p1, p1's corrects p0) is inferred from the
// field order.
module silvia_mul4 #(
  parameter bit B_SIGNED = 1'b1
) (
  input  logic [3:0] a0,
  input  logic [3:0] a1,
  input  logic [3:0] a2,
  input  logic [3:0] a3,
  input  logic [3:0] b,
  output logic [7:0] p0,
  output logic [7:0] p1,
  output logic [7:0] p2,
  output logic [7:0] p3
);
  logic        [26:0] port_a;
  logic signed [17:0] port_b;
  logic signed [44:0] prod;
  logic        [6:0]  f3;        // a3[3:1]*b
  logic        [7:0]  f2, f1, f0;
  logic        [7:0]  b8;
  logic        [7:0]  a3b0;

  always_comb begin
    port_a = {a0, 4'b0, a1, 4'b0, a2, 4'b0, a3[3:1]};
    port_b = B_SIGNED ? 18'(signed'(b)) : 18'(b);
    prod   = signed'({1'b0, port_a}) * 45'(port_b);
    f3 = prod[6:0];
    f2 = prod[14:7];
    f1 = prod[22:15];
    f0 = prod[30:23];
    b8 = B_SIGNED ? 8'(signed'(b)) : 8'(b);
    if (B_SIGNED) begin
      f2 = f2 + 8'(f3[6]);
      f1 = f1 + 8'(prod[14]);
      f0 = f0 + 8'(prod[22]);
    end
    a3b0 = a3[0] ? b8 : 8'd0;
    p3 = {f3, 1'b0} + a3b0;
    p2 = f2;
    p1 = f1;
    p0 = f0;
  end
endmodule
