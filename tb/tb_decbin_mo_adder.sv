// tb_decbin_mo_adder: end-to-end test of the unified multi-operand adder at
// its default size (8 operands of 16 digits, Four-Three split converter).
//
// Each vector sets a mode and eight operands and compares all 17 result
// digits with the sum worked out here in 128-bit integers (operands read as
// decimal or as hexadecimal numbers). Operands are random, all-maximum (all
// nines / all F), all-zero, or large digits only, and the mode alternates in
// runs so that it also switches between consecutive additions.
//
// Besides the result, the test counts how often each mechanism of the design
// was exercised and fails if one never was: decimal and binary additions,
// mode switches, a column sum of ten or more (tens digit passed to the next
// column), a decimal carry C inside a column converter, a carry in the
// final carry-propagate step, and a nonzero extra top digit.
module tb_decbin_mo_adder;
  import bcd_pkg::*;
  localparam int unsigned N_OPS = 8;
  localparam int unsigned NDIG  = 16;

  add_mode_t                       mode;
  digit_t    [N_OPS-1:0][NDIG-1:0] opnds;
  digit_t    [NDIG:0]              result;
  int checks = 0, failures = 0;

  int n_dec = 0, n_bin = 0, n_switch = 0, n_tens = 0, n_conv_c = 0;
  int n_final_carry = 0, n_top_digit = 0;

  decbin_mo_adder dut (.mode(mode), .opnds(opnds), .result(result));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vector();
    logic [127:0] radix, total, w, opv, p;
    int           colsum [NDIG];
    int           carry;
    radix = (mode == MODE_DEC) ? 128'd10 : 128'd16;
    total = '0;
    for (int j = 0; j < N_OPS; j++) begin
      opv = '0;
      for (int i = NDIG - 1; i >= 0; i--) opv = opv * radix + 128'(opnds[j][i]);
      total += opv;
    end
    // mechanism counts, from column sums worked out here
    carry = 0;
    for (int i = 0; i < NDIG; i++) begin
      colsum[i] = 0;
      for (int j = 0; j < N_OPS; j++) colsum[i] += int'(opnds[j][i]);
      if (mode == MODE_DEC) begin
        if (colsum[i] >= 10) n_tens++;
        if (((8 * (colsum[i] / 8)) % 10) + colsum[i] % 8 >= 10) n_conv_c++;
      end
    end
    for (int i = 0; i <= NDIG; i++) begin
      p = 128'(carry);
      if (i < NDIG) p += 128'(colsum[i]) % radix;
      if (i > 0) p += 128'(colsum[i-1]) / radix;
      carry = int'(p / radix);
      if (carry != 0) n_final_carry++;
    end
    if (result[NDIG] != 0) n_top_digit++;
    // result
    checks++;
    w = total;
    for (int i = 0; i <= NDIG; i++) begin
      if (128'(result[i]) != w % radix) begin
        failures++;
        $display("FAIL mode=%s digit %0d: got %0d expected %0d",
                 mode.name(), i, result[i], w % radix);
        break;
      end
      w /= radix;
    end
  endtask

  initial begin
    add_mode_t prev;
    prev = MODE_BIN;
    for (int t = 0; t < 5000; t++) begin
      int top;
      mode = ((t / 3) % 2 == 0) ? MODE_DEC : MODE_BIN;
      top  = (mode == MODE_DEC) ? 9 : 15;
      for (int j = 0; j < N_OPS; j++)
        for (int i = 0; i < NDIG; i++)
          case (t % 10)
            0:       opnds[j][i] = digit_t'(top);
            1:       opnds[j][i] = '0;
            2, 3:    opnds[j][i] = digit_t'($urandom_range(top - 3, top));
            default: opnds[j][i] = digit_t'($urandom_range(0, top));
          endcase
      if (t > 0 && mode != prev) n_switch++;
      prev = mode;
      if (mode == MODE_DEC) n_dec++; else n_bin++;
      #1;
      check_vector();
    end
    $display("decimal=%0d binary=%0d switches=%0d tens=%0d conv_carry=%0d final_carry=%0d top_digit=%0d",
             n_dec, n_bin, n_switch, n_tens, n_conv_c, n_final_carry, n_top_digit);
    if (n_dec == 0)         begin failures++; $display("FAIL no decimal addition"); end
    if (n_bin == 0)         begin failures++; $display("FAIL no binary addition"); end
    if (n_switch == 0)      begin failures++; $display("FAIL no mode switch"); end
    if (n_tens == 0)        begin failures++; $display("FAIL no column sum >= 10"); end
    if (n_conv_c == 0)      begin failures++; $display("FAIL no converter carry"); end
    if (n_final_carry == 0) begin failures++; $display("FAIL no final-step carry"); end
    if (n_top_digit == 0)   begin failures++; $display("FAIL no extra top digit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
