// digit_split: splits a 7-bit binary value into a high and a low digit in the
// radix of the current mode.
//
// MODE_DEC: hi = v div 10 and lo = v mod 10, computed by the binary-to-BCD
// converter selected by SPLIT (bd_conv_34 or bd_conv_43). MODE_BIN:
// hi = v div 16 and lo = v mod 16, which is only a bit slice. This is the one
// place where the two modes of the multi-operand adder differ.
// Purely combinational. With SPLIT_FOUR_THREE the decimal result is exact for
// v <= 87 (an assertion flags larger values in decimal mode), with
// SPLIT_THREE_FOUR for all v.
//
// The converters are the source design's; the mode multiplexer is this
// design's way of sharing one datapath between binary and decimal operands.
module digit_split
  import bcd_pkg::*;
#(
  parameter conv_split_t SPLIT = SPLIT_FOUR_THREE
) (
  input  add_mode_t mode,
  input  colsum_t   v,
  output digit_t    hi,
  output digit_t    lo
);

  digit_t dec_hi, dec_lo;

  if (SPLIT == SPLIT_THREE_FOUR) begin : g_conv34
    bd_conv_34 u_conv (.a(v), .dh(dec_hi), .dl(dec_lo));
  end else begin : g_conv43
    bd_conv_43 u_conv (.a(v), .dh(dec_hi), .dl(dec_lo));
  end

  always_comb begin
    if (mode == MODE_DEC) begin
      hi = dec_hi;
      lo = dec_lo;
    end else begin
      hi = {1'b0, v[6:4]};
      lo = v[3:0];
    end
  end

  // The Four-Three converter is exact for inputs 0..87 only.
  if (SPLIT == SPLIT_FOUR_THREE) begin : g_range
    always_comb begin
      if (mode == MODE_DEC)
        a_conv43_range : assert final (v <= 7'd87)
          else $error("digit_split: %0d is outside the Four-Three converter's range", v);
    end
  end

endmodule
