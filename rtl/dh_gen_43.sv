// dh_gen_43: optimized tens-digit (D_H) generator of the Four-Three split
// converter.
//
// The low bit group A2A1A0 never reaches ten, so the tens digit is only the
// share Y7..Y4 of the high group plus the decimal carry C of the units
// generator. The increment is flat logic: D_H[0] = Y4 ^ C,
// D_H[1] = C Y4 | Y5, D_H[3:2] = Y7 Y6. The carry never needs to travel past
// bit 1 because C and Y5 Y4 = 11 never occur together.
// Purely combinational.
//
// The equations follow the source design.
module dh_gen_43 (
  input  logic [3:0] y_h,  // Y7Y6Y5Y4
  input  logic       c,    // decimal carry of the D_L generator
  output logic [3:0] dh    // D_H
);

  always_comb begin
    dh[0] = (y_h[0] & ~c) | (~y_h[0] & c);
    dh[1] = (c & y_h[0]) | y_h[1];
    dh[2] = y_h[2];
    dh[3] = y_h[3];
  end

endmodule
