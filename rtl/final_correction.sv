// final_correction: turns the binary column sums of a multi-operand addition
// into the digits of the result, in decimal or binary radix.
//
// Column sum i stands for colsum[i] * R^i (R = 10 or 16). Each column sum is
// first split into hi_i and lo_i (colsum = hi*R + lo) by a digit_split. Digit
// position i then holds p_i = lo_i + hi_(i-1) + k_i, where k_i is the carry
// from position i-1; p_i is a 5-bit binary number (at most 9+12+2 = 23 in
// decimal mode) and is split again by a digit_split into the result digit
// (p_i mod R) and the carry k_(i+1) (p_i div R). Position NDIG has no column
// of its own and takes only hi_(NDIG-1) and its carry.
// Purely combinational: one layer of converters, then a ripple of NDIG+1
// converter stages. For column sums up to 8*15 the carry out of the top
// position is 0 and the result fits NDIG+1 digits.
//
// Correcting only once, after all operands have been added in binary, follows
// the source design. Building the final carry-propagate step from the same
// converters is this design's choice.
module final_correction
  import bcd_pkg::*;
#(
  parameter int unsigned NDIG  = 16,
  parameter conv_split_t SPLIT = SPLIT_FOUR_THREE
) (
  input  add_mode_t             mode,
  input  colsum_t   [NDIG-1:0]  colsum,
  output digit_t    [NDIG:0]    result
);

  digit_t [NDIG-1:0] hi, lo;

  for (genvar i = 0; i < NDIG; i++) begin : g_col
    digit_split #(.SPLIT(SPLIT)) u_split (
      .mode(mode), .v(colsum[i]), .hi(hi[i]), .lo(lo[i])
    );
  end

  for (genvar i = 0; i <= NDIG; i++) begin : g_pos
    logic [4:0] p;
    digit_t     k_out;   // carry into position i+1
    digit_t     digit;

    if (i == 0) begin : g_first
      assign p = {1'b0, lo[i]};
    end else if (i == NDIG) begin : g_last
      assign p = {1'b0, hi[i-1]} + {1'b0, g_pos[i-1].k_out};
    end else begin : g_mid
      assign p = {1'b0, lo[i]} + {1'b0, hi[i-1]} + {1'b0, g_pos[i-1].k_out};
    end

    digit_split #(.SPLIT(SPLIT)) u_split (
      .mode(mode), .v({2'b00, p}), .hi(k_out), .lo(digit)
    );
    assign result[i] = digit;
  end

endmodule
