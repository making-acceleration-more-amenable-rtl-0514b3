// silvia_muladd: two multiply-and-adds with one shared factor on one DSP.
//
// A DSP48-class slice has a 27-bit pre-adder, a 27x18 multiplier and a 48-bit
// post-adder. Two products x_hi*w and x_lo*w of small signed factors are formed
// with a single multiplication by placing x_hi 18 bits above x_lo in the
// pre-adder:  (x_hi*2^18 + x_lo) * w + pcin = (x_hi*w)*2^18 + x_lo*w + pcin.
// The lower 18 bits of the result then hold the sum of the x_lo*w products and
// the bits above them the sum of the x_hi*w products, so DSPs can be chained
// through pcin/pout (the cascade path) to accumulate N such pairs. The lower
// field must not overflow into the upper one: for W-bit signed factors the chain
// may be at most floor((2^17-1)/(2^(W-1)*2^(W-1))) long (7 for W = 8).
// silvia_muladd_extract separates the two sums at the end of the chain.
//
// Interface: x_hi, x_lo, w are W-bit signed; pcin is the previous slice's
// 48-bit output (zero for the first slice); pout is this slice's output.
// Timing: combinational, one add-multiply-add; a caller that maps it to a
// pipelined DSP registers the output. The packing and the overflow bound follow
// the factor-2 MAD packing method; the combinational form is this design's choice.
module silvia_muladd #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0] x_hi,
  input  logic signed [W-1:0] x_lo,
  input  logic signed [W-1:0] w,
  input  logic signed [47:0]  pcin,
  output logic signed [47:0]  pout
);
  logic signed [26:0] port_a;   // x_hi shifted into the upper field
  logic signed [26:0] port_d;   // x_lo, sign-extended
  logic signed [26:0] preadd;
  logic signed [17:0] port_b;   // shared factor
  logic signed [44:0] prod;

  initial begin
    assert (W <= 9) else $error("silvia_muladd: factors wider than 9 bits do not fit the 27-bit pre-adder");
  end

  always_comb begin
    port_a = 27'(x_hi) <<< 18;
    port_d = 27'(x_lo);
    preadd = port_a + port_d;
    port_b = 18'(w);
    prod   = 45'(preadd) * 45'(port_b);
    pout   = 48'(prod) + pcin;
  end
endmodule
