// bd_conv_34: Three-Four split 7-bit binary to two-digit decimal converter.
//
// The input A6..A0 (0..127) is cut into A6A5A4 and A3A2A1A0. Each group's
// value is turned at once into its share of the tens digit and of the units
// digit (contrib_hi3, contrib_lo4). The units shares are added and corrected
// in dl_gen_34, which also yields the decimal carry C; the tens shares and C
// are added in dh_gen_34. Result: dh = A div 10, dl = A mod 10. dh is a BCD
// digit for A <= 99 and the binary value 10..12 above that.
// Purely combinational; the longest path runs through the two units adders
// and the tens adder.
//
// Block split and wiring follow the source design.
module bd_conv_34 (
  input  logic [6:0] a,   // A6..A0
  output logic [3:0] dh,  // D_H
  output logic [3:0] dl   // D_L
);

  logic [3:0] x_h;
  logic [2:0] x_l;
  logic       z4;
  logic [2:0] z_l;
  logic       c;

  contrib_hi3 u_hi (.a_hi(a[6:4]), .x_h(x_h), .x_l(x_l));
  contrib_lo4 u_lo (.a_lo(a[3:0]), .z4(z4),   .z_l(z_l));
  dl_gen_34   u_dl (.x_l(x_l), .z_l(z_l), .a0(a[0]), .dl(dl), .c(c));
  dh_gen_34   u_dh (.x_h(x_h), .z4(z4), .c(c), .dh(dh));

endmodule
