// dh_gen_34: tens-digit (D_H) generator of the Three-Four split converter.
//
// D_H is the sum of the tens contribution of A6A5A4 (X7..X4), the tens carry
// Z4 of A3..A0 and the decimal carry C of the units generator. X7 is wired
// straight to D_H[3]; a 3-bit adder adds X6X5X4, the vector 0,0,Z4 and C as
// its carry-in, and its sum is D_H[2:0]. Its carry-out is dropped: for any
// 7-bit input it is 0 (whenever X6X5X4 = 110, Z4 and C cannot both be set).
// For inputs 100..127 D_H is the binary value 10..12.
// Purely combinational.
//
// The structure follows the source design's figure.
module dh_gen_34 (
  input  logic [3:0] x_h,  // X7X6X5X4
  input  logic       z4,   // tens carry of the low bit group
  input  logic       c,    // decimal carry of the D_L generator
  output logic [3:0] dh    // D_H
);

  logic [3:0] s;  // {Cout, sum}

  always_comb begin
    s  = {1'b0, x_h[2:0]} + {3'b000, z4} + {3'b000, c};
    dh = {x_h[3], s[2:0]};
  end

endmodule
