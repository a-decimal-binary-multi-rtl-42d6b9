// tb_csa_tree: random check of the carry-save tree. For the default tree
// (8 operands of 7 bits) and for smaller trees (5, 3, 2 and 1 operands) the
// two output words must add up, modulo 2^7, to the sum of the operands,
// computed here with an ordinary loop. Operands are 0..15 (one digit each),
// as in the multi-operand adder, plus runs of all-maximum operands.
module tb_csa_tree;
  localparam int unsigned W = 7;

  logic [7:0][W-1:0] ops8;
  logic [W-1:0]      s8, c8, s5, c5, s3, c3, s2, c2, s1, c1;
  int checks = 0, failures = 0;

  csa_tree                dut8 (.ops(ops8),      .sum_vec(s8), .carry_vec(c8));
  csa_tree #(.N(5), .W(W)) dut5 (.ops(ops8[4:0]), .sum_vec(s5), .carry_vec(c5));
  csa_tree #(.N(3), .W(W)) dut3 (.ops(ops8[2:0]), .sum_vec(s3), .carry_vec(c3));
  csa_tree #(.N(2), .W(W)) dut2 (.ops(ops8[1:0]), .sum_vec(s2), .carry_vec(c2));
  csa_tree #(.N(1), .W(W)) dut1 (.ops(ops8[0:0]), .sum_vec(s1), .carry_vec(c1));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sum(int n);
    int t = 0;
    for (int j = 0; j < n; j++) t += int'(ops8[j]);
    return t;
  endfunction

  task automatic check(string name, int n, logic [W-1:0] s, logic [W-1:0] c);
    checks++;
    if (int'(W'(s + c)) != ref_sum(n)) begin
      failures++;
      $display("FAIL %s: sum=%0d expected %0d", name, W'(s + c), ref_sum(n));
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int j = 0; j < 8; j++)
        ops8[j] = (t < 10) ? W'(15 - t) : W'($urandom_range(0, 15));
      #1;
      check("N=8", 8, s8, c8);
      check("N=5", 5, s5, c5);
      check("N=3", 3, s3, c3);
      check("N=2", 2, s2, c2);
      check("N=1", 1, s1, c1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
