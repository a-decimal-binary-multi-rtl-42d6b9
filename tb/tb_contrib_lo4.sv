// tb_contrib_lo4: exhaustive check of the A3A2A1A0 contribution generator.
// For every v = 0..15: z4 = (v >= 10) and z_l = (v mod 10)/2.
module tb_contrib_lo4;
  logic [3:0] a_lo;
  logic       z4;
  logic [2:0] z_l;
  int checks = 0, failures = 0;

  contrib_lo4 dut (.a_lo(a_lo), .z4(z4), .z_l(z_l));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      a_lo = 4'(v);
      #1;
      checks++;
      if (int'(z4) != v / 10 || int'(z_l) != (v % 10) / 2) begin
        failures++;
        $display("FAIL v=%0d z4=%0d z_l=%0d", v, z4, z_l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
