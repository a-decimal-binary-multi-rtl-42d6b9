// dl_gen_34: units-digit (D_L) generator of the Three-Four split converter.
//
// The units contributions of the two bit groups, X3X2X1 and Z3Z2Z1, are
// counted in steps of two (weights 2, 4, 8), so their sum t = X + Z is half
// the even part of the units sum. A first 3-bit adder (carry-in 0) forms t
// with its carry-out. The decimal carry C is raised when t >= 5, i.e. when the
// units sum reaches ten. A second 3-bit adder (carry-in 0) adds the correction
// 0,C,C (three half-units, i.e. +6 on the full digit, the usual BCD fix) to
// the first sum and drops its own carry-out, which gives D_L[3:1]. A0 is
// D_L[0] unchanged. C goes on to the tens generator.
// Purely combinational. X and Z are at most 4 each (t <= 8).
//
// The two adders, their fixed carry-ins, the 0CC correction and the A0 bypass
// follow the source design's figure. The figure forms C from the first adder's
// carry-out and sum lines without naming the gates; here C is written as the
// comparison those gates decide.
module dl_gen_34 (
  input  logic [2:0] x_l,  // X3X2X1
  input  logic [2:0] z_l,  // Z3Z2Z1
  input  logic       a0,   // A0
  output logic [3:0] dl,   // D_L
  output logic       c     // decimal carry to D_H
);

  logic [3:0] t;    // first adder: {Cout, S3 S2 S1}
  logic [3:0] fix;  // second adder, its carry-out unused

  always_comb begin
    t   = {1'b0, x_l} + {1'b0, z_l};
    c   = (t >= 4'd5);
    fix = {1'b0, t[2:0]} + {2'b00, c, c};
    dl  = {fix[2:0], a0};
  end

endmodule
