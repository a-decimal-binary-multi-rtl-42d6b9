// tb_dh_gen_34: checks the Three-Four split tens-digit generator. For every
// 7-bit number n the inputs it would receive (tens share of the high bits,
// tens carry of the low bits, decimal carry of the units) are worked out here
// by integer arithmetic; D_H must equal n div 10.
module tb_dh_gen_34;
  logic [3:0] x_h;
  logic       z4, c;
  logic [3:0] dh;
  int checks = 0, failures = 0;

  dh_gen_34 dut (.x_h(x_h), .z4(z4), .c(c), .dh(dh));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 128; n++) begin
      int hi, lo;
      hi  = 16 * (n / 16);
      lo  = n % 16;
      x_h = 4'(hi / 10);
      z4  = 1'(lo / 10);
      c   = 1'(((hi % 10) + (lo % 10)) / 10);
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
