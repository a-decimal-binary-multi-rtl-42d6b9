// tb_contrib_hi3: exhaustive check of the A6A5A4 contribution generator.
// For every k = 0..7 the tens share must be floor(16k/10) and the units share
// (16k mod 10)/2, both worked out here by integer arithmetic.
module tb_contrib_hi3;
  logic [2:0] a_hi;
  logic [3:0] x_h;
  logic [2:0] x_l;
  int checks = 0, failures = 0;

  contrib_hi3 dut (.a_hi(a_hi), .x_h(x_h), .x_l(x_l));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      a_hi = 3'(k);
      #1;
      checks++;
      if (int'(x_h) != (16 * k) / 10 || int'(x_l) != ((16 * k) % 10) / 2) begin
        failures++;
        $display("FAIL k=%0d x_h=%0d x_l=%0d", k, x_h, x_l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
