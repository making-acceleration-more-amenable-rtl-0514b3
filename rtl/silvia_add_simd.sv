// silvia_add_simd: SIMD adder of a DSP slice (four 12-bit or two 24-bit lanes).
//
// The 48-bit adder of a DSP48-class slice can be split into independent lanes:
// four lanes of 12 bits (FOUR12) or two of 24 bits (TWO24). Carries do not
// cross lane boundaries, so each lane adds (or subtracts) its own pair of
// operands, signed or unsigned, and keeps its own carry-out.
//
// Interface: x and y each pack the lane operands, lane 0 in the low bits.
// sub selects x - y for all lanes (one operating mode for the whole slice, as
// in the DSP). mode selects the lane width. s holds the lane results in the same
// packing, carry the carry-out (borrow-free flag for a subtraction) of each
// lane; in TWO24 mode carry[1:0] are used and carry[3:2] are zero.
// Timing: combinational. Lane widths follow the DSP's SIMD modes; the port
// packing is this design's choice.
module silvia_add_simd (
  input  logic        mode_two24,
  input  logic        sub,
  input  logic [47:0] x,
  input  logic [47:0] y,
  output logic [47:0] s,
  output logic [3:0]  carry
);
  logic [12:0] l12 [4];
  logic [24:0] l24 [2];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      l12[i] = sub ? ({1'b0, x[12*i +: 12]} + {1'b0, ~y[12*i +: 12]} + 13'd1)
                   : ({1'b0, x[12*i +: 12]} + {1'b0,  y[12*i +: 12]});
    end
    for (int i = 0; i < 2; i++) begin
      l24[i] = sub ? ({1'b0, x[24*i +: 24]} + {1'b0, ~y[24*i +: 24]} + 25'd1)
                   : ({1'b0, x[24*i +: 24]} + {1'b0,  y[24*i +: 24]});
    end
    if (mode_two24) begin
      s     = {l24[1][23:0], l24[0][23:0]};
      carry = {2'b00, l24[1][24], l24[0][24]};
    end else begin
      s     = {l12[3][11:0], l12[2][11:0], l12[1][11:0], l12[0][11:0]};
      carry = {l12[3][12], l12[2][12], l12[1][12], l12[0][12]};
    end
  end
endmodule
