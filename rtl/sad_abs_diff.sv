// sad_abs_diff: absolute difference |C - R| of two 8-bit pixels, the element
// of the SAD sum.
//
// Both pixels are zero-extended to 9 bits. R is negated in two's complement
// and added to C; bit 8 of the 9-bit sum is then the sign of C - R. When it is
// set the sum is negated again, otherwise it is already the magnitude. This
// is the adder / conditional-negate formulation the design uses instead of a
// compare-and-subtract. Purely combinational.
module sad_abs_diff (
  input  logic [7:0] c_pix,   // original pixel C
  input  logic [7:0] r_pix,   // predicted pixel R
  output logic [7:0] abs_diff // |C - R|
);
  logic [8:0] c9, r9, sum9;

  always_comb begin
    c9   = {1'b0, c_pix};
    r9   = {1'b0, r_pix};
    sum9 = c9 + (~r9) + 9'd1;               // C - R, 9-bit two's complement
    // a magnitude of at most 255 always fits the lower 8 bits
    abs_diff = sum9[8] ? 8'((~sum9) + 9'd1) : sum9[7:0];
  end
endmodule
