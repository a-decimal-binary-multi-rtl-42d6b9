// csa_tree: carry-save adder tree that compresses N operands of W bits into
// two words whose sum is the sum of all operands.
//
// Level by level, the rows still present are taken three at a time into a
// csa_3to2 compressor (three rows in, two out); one or two leftover rows pass
// to the next level unchanged. This repeats until two rows remain (a
// Wallace-style tree: 8 operands take 4 levels). No carry propagates inside
// the tree; the caller adds sum_vec + carry_vec with one carry-propagate
// adder. W must hold the complete sum; carries out of the top bit are dropped.
// Purely combinational.
//
// Using a CSA tree to add the operands follows the source design; its shape
// is this design's choice.
module csa_tree #(
  parameter int unsigned N = 8,  // number of operands, >= 1
  parameter int unsigned W = 7   // width of operands and of the total
) (
  input  logic [N-1:0][W-1:0] ops,
  output logic [W-1:0]        sum_vec,
  output logic [W-1:0]        carry_vec
);

  // Rows left after lv levels of 3:2 compression.
  function automatic int unsigned rows_after(int unsigned n0, int unsigned lv);
    int unsigned n = n0;
    for (int unsigned k = 0; k < lv; k++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  // Levels needed to get down to two rows.
  function automatic int unsigned num_levels(int unsigned n0);
    int unsigned lv = 0;
    while (rows_after(n0, lv) > 2) lv++;
    return lv;
  endfunction

  localparam int unsigned LEVELS = num_levels(N);

  // Each level reads the rows of the level before it (the operands for level
  // 0) and drives its own out_rows; the last level's two rows are the result.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NI = rows_after(N, l);
    localparam int unsigned G  = NI / 3;
    localparam int unsigned NO = rows_after(N, l + 1);

    logic [W-1:0] in_rows  [NI];
    logic [W-1:0] out_rows [NO];

    for (genvar j = 0; j < NI; j++) begin : g_in
      if (l == 0) begin : g_ops
        assign in_rows[j] = ops[j];
      end else begin : g_prev
        assign in_rows[j] = g_level[l-1].out_rows[j];
      end
    end

    for (genvar g = 0; g < G; g++) begin : g_csa
      csa_3to2 #(.W(W)) u_csa (
        .a (in_rows[3*g]),
        .b (in_rows[3*g+1]),
        .c (in_rows[3*g+2]),
        .s (out_rows[2*g]),
        .cy(out_rows[2*g+1])
      );
    end

    for (genvar r = 0; r < NI % 3; r++) begin : g_pass
      assign out_rows[2*G+r] = in_rows[3*G+r];
    end
  end

  if (LEVELS > 0) begin : g_tree
    assign sum_vec   = g_level[LEVELS-1].out_rows[0];
    assign carry_vec = g_level[LEVELS-1].out_rows[1];
  end else if (N == 2) begin : g_two
    assign sum_vec   = ops[0];
    assign carry_vec = ops[1];
  end else begin : g_one
    assign sum_vec   = ops[0];
    assign carry_vec = '0;
  end

endmodule
