// contrib_hi3: A6A5A4 contribution generator of the Three-Four split
// binary-to-BCD converter.
//
// The three high bits of a 7-bit number weigh 16*k, k = A6A5A4. This block
// gives that weight as two decimal parts: x_h = floor(16k/10), the
// contribution to the tens digit D_H (X7..X4), and x_l = (16k mod 10)/2, the
// contribution to the units digit D_L with weights 2, 4, 8 (X3..X1). The units
// contribution is always even, so its weight-1 bit is not carried.
// Purely combinational.
//
// What the block computes follows the source design; its gate-level form is
// not published there, so it is written here as the 8-entry table itself.
module contrib_hi3 (
  input  logic [2:0] a_hi,  // A6A5A4
  output logic [3:0] x_h,   // X7X6X5X4
  output logic [2:0] x_l    // X3X2X1
);

  always_comb begin
    unique case (a_hi)
      3'd0: begin x_h = 4'd0;  x_l = 3'd0; end  //   0 ->  0 | 0
      3'd1: begin x_h = 4'd1;  x_l = 3'd3; end  //  16 ->  1 | 6
      3'd2: begin x_h = 4'd3;  x_l = 3'd1; end  //  32 ->  3 | 2
      3'd3: begin x_h = 4'd4;  x_l = 3'd4; end  //  48 ->  4 | 8
      3'd4: begin x_h = 4'd6;  x_l = 3'd2; end  //  64 ->  6 | 4
      3'd5: begin x_h = 4'd8;  x_l = 3'd0; end  //  80 ->  8 | 0
      3'd6: begin x_h = 4'd9;  x_l = 3'd3; end  //  96 ->  9 | 6
      3'd7: begin x_h = 4'd11; x_l = 3'd1; end  // 112 -> 11 | 2
    endcase
  end

endmodule
