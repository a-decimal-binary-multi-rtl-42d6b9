// contrib_lo4: A3A2A1A0 contribution generator of the Three-Four split
// binary-to-BCD converter.
//
// The four low bits v = A3..A0 (0..15) contribute at most one ten: z4 is set
// when v >= 10 and goes to the tens digit D_H. The units part v mod 10 keeps
// A0 as its lowest bit (subtracting ten keeps the parity), so only its upper
// three bits z_l = (v mod 10)/2 = Z3Z2Z1 are passed on; A0 reaches D_L[0]
// directly. Purely combinational.
//
// The one-bit tens contribution and D_L[0] = A0 follow the source design; the
// compare-and-subtract form is the simplest logic with that function and is
// this design's own choice.
module contrib_lo4 (
  input  logic [3:0] a_lo,  // A3A2A1A0
  output logic       z4,    // contribution to D_H
  output logic [2:0] z_l    // Z3Z2Z1
);

  logic [3:0] units;

  always_comb begin
    z4    = (a_lo >= 4'd10);
    units = z4 ? a_lo - 4'd10 : a_lo;
    z_l   = units[3:1];
  end

endmodule
