// tb_bd_conv_34: exhaustive check of the Three-Four split converter over all
// 128 inputs: dh = a div 10, dl = a mod 10.
module tb_bd_conv_34;
  logic [6:0] a;
  logic [3:0] dh, dl;
  int checks = 0, failures = 0;

  bd_conv_34 dut (.a(a), .dh(dh), .dl(dl));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 128; n++) begin
      a = 7'(n);
      #1;
      checks++;
      if (int'(dh) != n / 10 || int'(dl) != n % 10) begin
        failures++;
        $display("FAIL a=%0d dh=%0d dl=%0d", n, dh, dl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
