// dl_gen_43: optimized units-digit (D_L) generator of the Four-Three split
// converter.
//
// The units shares are Y3Y2Y1 (from A6..A3, weights 2, 4, 8) and 0A2A1 (the
// low bits themselves, weights 2 and 4); A0 is D_L[0] unchanged. Stage I adds
// the two 3-bit values with no carry-in as flat logic S3 S2 S1, valid for the
// input pairs that can occur. The carry generator raises C when the sum
// reaches 5 half-units (a units sum of ten or more). The correction adds
// 0,C,C to S and drops the carry-out, giving D_L[3:1].
// Purely combinational; exact for converter inputs 0..87.
//
// Stage I, the carry generator and the bypass of A0 follow the source
// design's logic equations. Two points are this design's own: the term
// Y1 A2 A1 belongs to S3, and S2 is written as its exact sum bit
// Y2 ^ A2 ^ (Y1 & A1). The correction is a plain 3-bit adder, as in the
// Three-Four split.
module dl_gen_43 (
  input  logic [2:0] y_l,   // Y3Y2Y1
  input  logic [2:0] a_lo,  // A2A1A0
  output logic [3:0] dl,    // D_L
  output logic       c      // decimal carry to D_H
);

  logic       y3, y2, y1, a2, a1;
  logic [2:0] s;
  logic [3:0] fix;  // correction adder, carry-out unused

  always_comb begin
    {y3, y2, y1} = y_l;
    {a2, a1}     = a_lo[2:1];
    // optimized addition stage I
    s[2] = y3 | (y2 & y1 & a1) | (y2 & a2) | (y1 & a2 & a1);
    s[1] = y2 ^ a2 ^ (y1 & a1);
    s[0] = (y1 & ~a1) | (~y1 & a1);
    // carry generator
    c    = (y2 & y1 & a2) | (y3 & a1) | (y3 & a2) | (y2 & a2 & a1);
    // correction
    fix  = {1'b0, s} + {2'b00, c, c};
    dl   = {fix[2:0], a_lo[0]};
  end

endmodule
