// silvia_muladd_extract: recover the two sums from a packed MAD chain output.
//
// The output of the last silvia_muladd slice holds sum(x_lo*w) in bits 17:0 and
// sum(x_hi*w) in bits 35:18. When the lower sum is negative its two's-complement
// representation has borrowed one from the upper field, so the upper sum is
// corrected by adding bit 17 (the sign of the lower field) back to it.
// Both results are 18-bit signed. Combinational.
module silvia_muladd_extract (
  input  logic signed [47:0] p,
  output logic signed [17:0] sum_hi,
  output logic signed [17:0] sum_lo
);
  always_comb begin
    sum_lo = p[17:0];
    sum_hi = p[35:18] + 18'(p[17]);
  end
endmodule
