// tb_dl_gen_43: checks the Four-Three split units-digit generator for every
// converter input n = 0..87. Its inputs (units share of the high bits, low
// bits) and the expected D_L = n mod 10 and C (units sum >= 10) are worked
// out here by integer arithmetic.
module tb_dl_gen_43;
  logic [2:0] y_l, a_lo;
  logic [3:0] dl;
  logic       c;
  int checks = 0, failures = 0;

  dl_gen_43 dut (.y_l(y_l), .a_lo(a_lo), .dl(dl), .c(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n <= 87; n++) begin
      int hi;
      hi   = 8 * (n / 8);
      y_l  = 3'((hi % 10) / 2);
      a_lo = 3'(n % 8);
      #1;
      checks++;
      if (int'(dl) != n % 10 || int'(c) != ((hi % 10) + n % 8) / 10) begin
        failures++;
        $display("FAIL n=%0d dl=%0d c=%0d", n, dl, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
