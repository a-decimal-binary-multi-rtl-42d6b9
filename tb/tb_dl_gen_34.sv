// tb_dl_gen_34: checks the Three-Four split units-digit generator on every
// input it can receive: X, Z in 0..4 (half-units) and A0. The units sum is
// u = 2X + 2Z + A0; D_L must be u mod 10 and C must be u >= 10.
module tb_dl_gen_34;
  logic [2:0] x_l, z_l;
  logic       a0;
  logic [3:0] dl;
  logic       c;
  int checks = 0, failures = 0;

  dl_gen_34 dut (.x_l(x_l), .z_l(z_l), .a0(a0), .dl(dl), .c(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x <= 4; x++)
      for (int z = 0; z <= 4; z++)
        for (int b = 0; b < 2; b++) begin
          int u;
          x_l = 3'(x); z_l = 3'(z); a0 = 1'(b);
          u = 2 * x + 2 * z + b;
          #1;
          checks++;
          if (int'(dl) != u % 10 || int'(c) != u / 10) begin
            failures++;
            $display("FAIL x=%0d z=%0d a0=%0d dl=%0d c=%0d", x, z, b, dl, c);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
