// tb_dh_gen_43: checks the Four-Three split tens-digit generator for every
// converter input n = 0..127: given the tens share floor(8k/10) of the high
// bits and the decimal carry of the units, D_H must equal n div 10.
module tb_dh_gen_43;
  logic [3:0] y_h;
  logic       c;
  logic [3:0] dh;
  int checks = 0, failures = 0;

  dh_gen_43 dut (.y_h(y_h), .c(c), .dh(dh));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 128; n++) begin
      int hi;
      hi  = 8 * (n / 8);
      y_h = 4'(hi / 10);
      c   = 1'(((hi % 10) + n % 8) / 10);
      #1;
      checks++;
      if (int'(dh) != n / 10) begin
        failures++;
        $display("FAIL n=%0d dh=%0d", n, dh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
