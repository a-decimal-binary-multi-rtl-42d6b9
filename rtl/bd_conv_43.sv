// bd_conv_43: Four-Three split 7-bit binary to two-digit BCD converter.
//
// The input A6..A0 is cut into A6A5A4A3 and A2A1A0. The low group is below
// ten, so it adds nothing to the tens digit and its units share is its own
// bits; only the high group needs a contribution generator (contrib_hi4).
// dl_gen_43 adds the units shares and produces the decimal carry C;
// dh_gen_43 adds C to the tens share. Result: dh = A div 10, dl = A mod 10
// for A = 0..87; larger inputs are outside the range the logic is made for.
// Purely combinational and shallower than the Three-Four split: no
// contribution logic on the low bits and no adder in the tens path.
//
// Structure and equations follow the source design.
module bd_conv_43 (
  input  logic [6:0] a,   // A6..A0
  output logic [3:0] dh,  // D_H
  output logic [3:0] dl   // D_L
);

  logic [3:0] y_h;
  logic [2:0] y_l;
  logic       c;

  contrib_hi4 u_hi (.a_hi(a[6:3]), .y_h(y_h), .y_l(y_l));
  dl_gen_43   u_dl (.y_l(y_l), .a_lo(a[2:0]), .dl(dl), .c(c));
  dh_gen_43   u_dh (.y_h(y_h), .c(c), .dh(dh));

endmodule
