// contrib_hi4: A6A5A4A3 contribution generator of the Four-Three split
// binary-to-BCD converter.
//
// The four high bits weigh 8*k, k = A6A5A4A3. Their share of the tens digit is
// y_h = Y7..Y4 = floor(8k/10); their share of the units digit is even and is
// given as y_l = Y3Y2Y1 = (8k mod 10)/2 (weights 2, 4, 8). The outputs are
// two-level sum-of-products expressions of A6..A3.
// Purely combinational.
//
// The expressions follow the source design. They are exact for k <= 10
// (converter inputs 0..87) and treat larger k as don't cares, which suits the
// intended use on digit products (at most 81). The product term (not A5) A4 A3
// of Y2 is this design's reading of the published expression.
module contrib_hi4 (
  input  logic [3:0] a_hi,  // A6A5A4A3
  output logic [3:0] y_h,   // Y7Y6Y5Y4
  output logic [2:0] y_l    // Y3Y2Y1
);

  logic a6, a5, a4, a3;

  always_comb begin
    {a6, a5, a4, a3} = a_hi;
    // Y7
    y_h[3] = a6 & a4;
    // Y6
    y_h[2] = (a5 & a4 & ~a3) | (a6 & ~a4 & ~a3) | (a5 & a3) | (a6 & a3);
    // Y5
    y_h[1] = (~a5 & a4 & a3) | (a6 & ~a4 & ~a3) | (a5 & ~a4 & ~a3) | (a6 & a3);
    // Y4
    y_h[0] = (~a6 & ~a5 & a4 & ~a3) | (a5 & ~a4 & ~a3) | (a5 & a4 & a3) | (a6 & a3);
    // Y3
    y_l[2] = (~a6 & ~a5 & ~a4 & a3) | (a5 & a4 & ~a3);
    // Y2
    y_l[1] = (~a6 & ~a5 & a4 & ~a3) | (~a5 & a4 & a3) | (a6 & ~a4 & ~a3) | (a5 & a4 & a3);
    // Y1
    y_l[0] = (~a6 & ~a5 & a4 & ~a3) | (a5 & ~a4 & ~a3) | (a5 & a4 & a3) | (a6 & a3);
  end

endmodule
