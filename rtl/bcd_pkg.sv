// bcd_pkg: types shared by the decimal/binary multi-operand adder.
//
// A digit is four bits: a BCD digit 0..9 in decimal mode, a hexadecimal
// nibble 0..15 in binary mode. A column sum is the plain binary sum of one
// digit position over all operands and is seven bits wide, the input width
// of the binary-to-BCD converters. The converter split (Three-Four or
// Four-Three) is chosen per instance through conv_split_t.
package bcd_pkg;

  localparam int unsigned DIGIT_W  = 4;
  localparam int unsigned COLSUM_W = 7;

  typedef logic [DIGIT_W-1:0]  digit_t;
  typedef logic [COLSUM_W-1:0] colsum_t;

  // Radix of an addition: binary numbers or BCD numbers.
  typedef enum logic {
    MODE_BIN = 1'b0,
    MODE_DEC = 1'b1
  } add_mode_t;

  // How the 7-bit converter splits its input A6..A0.
  typedef enum logic {
    SPLIT_THREE_FOUR = 1'b0,  // A6A5A4 | A3A2A1A0
    SPLIT_FOUR_THREE = 1'b1   // A6A5A4A3 | A2A1A0
  } conv_split_t;

endpackage
