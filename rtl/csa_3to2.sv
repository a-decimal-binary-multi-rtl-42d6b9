// csa_3to2: one row of W full adders used as a 3:2 carry-save compressor.
//
// Three W-bit operands are reduced to a sum word (bitwise XOR) and a carry
// word (bitwise majority) such that a + b + c = s + cy, with cy already
// shifted one place up. The carry out of bit W-1 is dropped, so W must be
// wide enough for the total being accumulated. Purely combinational.
//
// The carry-save principle is the one the source design names for its
// operand compression; the row itself is standard.
module csa_3to2 #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W-1:0] maj;

  always_comb begin
    s   = a ^ b ^ c;
    maj = (a & b) | (a & c) | (b & c);
    cy  = {maj[W-2:0], 1'b0};
  end

endmodule
