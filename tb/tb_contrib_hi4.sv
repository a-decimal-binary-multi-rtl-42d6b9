// tb_contrib_hi4: checks the A6A5A4A3 contribution generator for k = 0..10
// (converter inputs 0..87, the range its equations are made for): tens share
// floor(8k/10), units share (8k mod 10)/2.
module tb_contrib_hi4;
  logic [3:0] a_hi;
  logic [3:0] y_h;
  logic [2:0] y_l;
  int checks = 0, failures = 0;

  contrib_hi4 dut (.a_hi(a_hi), .y_h(y_h), .y_l(y_l));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 10; k++) begin
      a_hi = 4'(k);
      #1;
      checks++;
      if (int'(y_h) != (8 * k) / 10 || int'(y_l) != ((8 * k) % 10) / 2) begin
        failures++;
        $display("FAIL k=%0d y_h=%0d y_l=%0d", k, y_h, y_l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
