// decbin_mo_adder: unified decimal/binary multi-operand adder.
//
// Adds N_OPS operands of NDIG four-bit digits at once. In MODE_DEC the digits
// are BCD and the result is the decimal sum; in MODE_BIN they are hexadecimal
// nibbles of binary numbers and the result is the binary sum. Both modes use
// the same datapath:
//   1. every digit column is added in plain binary: a CSA tree (csa_tree)
//      compresses the N_OPS digits to two words and one 7-bit adder gives the
//      column sum (at most N_OPS*15 <= 127);
//   2. final_correction splits each column sum into a high and a low digit
//      (binary-to-BCD converter in decimal mode, bit slicing in binary mode)
//      and adds the split parts with one carry-propagate pass.
// No decimal correction happens inside the tree; the tree never needs to know
// the mode. The result has NDIG+1 digits, enough for up to 8 operands.
// Purely combinational: inputs to result in one cycle of whatever clock the
// surrounding logic uses.
//
// The column-wise binary addition with a CSA tree and the single decimal
// correction through the fast converter follow the source design. Operand
// count, digit count, the choice of the Four-Three converter as default and
// the way binary mode shares the datapath are this design's choices.
module decbin_mo_adder
  import bcd_pkg::*;
#(
  parameter int unsigned N_OPS = 8,   // operands, 1..8
  parameter int unsigned NDIG  = 16,  // digits per operand
  parameter conv_split_t SPLIT = SPLIT_FOUR_THREE
) (
  input  add_mode_t                        mode,
  input  digit_t    [N_OPS-1:0][NDIG-1:0]  opnds,   // opnds[j][i]: digit i of operand j
  output digit_t    [NDIG:0]               result
);

  if (N_OPS < 1 || N_OPS * 15 > 127) begin : g_bad_n_ops
    $error("decbin_mo_adder: N_OPS must be 1..8 so that a column sum fits 7 bits");
  end

  colsum_t [NDIG-1:0] colsum;

  for (genvar i = 0; i < NDIG; i++) begin : g_column
    colsum_t [N_OPS-1:0] col_ops;
    colsum_t             sum_vec, carry_vec;

    for (genvar j = 0; j < N_OPS; j++) begin : g_op
      assign col_ops[j] = {3'b000, opnds[j][i]};
    end

    csa_tree #(.N(N_OPS), .W(COLSUM_W)) u_tree (
      .ops(col_ops), .sum_vec(sum_vec), .carry_vec(carry_vec)
    );

    assign colsum[i] = sum_vec + carry_vec;
  end

  final_correction #(.NDIG(NDIG), .SPLIT(SPLIT)) u_final (
    .mode(mode), .colsum(colsum), .result(result)
  );

endmodule
