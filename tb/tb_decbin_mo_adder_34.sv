// tb_decbin_mo_adder_34: end-to-end test of the multi-operand adder built
// with the Three-Four split converter, at several operand counts (8, 5, 1)
// and 6 digits. Random operands in both modes; every result digit is compared
// with the sum worked out here in 64-bit integers.
module tb_decbin_mo_adder_34;
  import bcd_pkg::*;
  localparam int unsigned NDIG = 6;

  add_mode_t                  mode;
  digit_t    [7:0][NDIG-1:0]  opnds;
  digit_t    [NDIG:0]         r8, r5, r1;
  int checks = 0, failures = 0;

  decbin_mo_adder #(.N_OPS(8), .NDIG(NDIG), .SPLIT(SPLIT_THREE_FOUR)) dut8 (
    .mode(mode), .opnds(opnds), .result(r8));
  decbin_mo_adder #(.N_OPS(5), .NDIG(NDIG), .SPLIT(SPLIT_THREE_FOUR)) dut5 (
    .mode(mode), .opnds(opnds[4:0]), .result(r5));
  decbin_mo_adder #(.N_OPS(1), .NDIG(NDIG), .SPLIT(SPLIT_THREE_FOUR)) dut1 (
    .mode(mode), .opnds(opnds[0:0]), .result(r1));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string name, int n, digit_t [NDIG:0] res);
    longint unsigned radix, total, opv;
    radix = (mode == MODE_DEC) ? 10 : 16;
    total = 0;
    for (int j = 0; j < n; j++) begin
      opv = 0;
      for (int i = NDIG - 1; i >= 0; i--) opv = opv * radix + longint'(opnds[j][i]);
      total += opv;
    end
    checks++;
    for (int i = 0; i <= NDIG; i++) begin
      if (longint'(res[i]) != total % radix) begin
        failures++;
        $display("FAIL %s mode=%s digit %0d: got %0d expected %0d",
                 name, mode.name(), i, res[i], total % radix);
        break;
      end
      total /= radix;
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int top;
      mode = (t % 2 == 0) ? MODE_DEC : MODE_BIN;
      top  = (mode == MODE_DEC) ? 9 : 15;
      for (int j = 0; j < 8; j++)
        for (int i = 0; i < NDIG; i++)
          opnds[j][i] = (t % 7 == 0) ? digit_t'(top) : digit_t'($urandom_range(0, top));
      #1;
      check("N_OPS=8", 8, r8);
      check("N_OPS=5", 5, r5);
      check("N_OPS=1", 1, r1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
