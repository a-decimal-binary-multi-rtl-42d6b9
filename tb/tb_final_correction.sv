// tb_final_correction: random check of the final correction step in both
// radices and with both converter splits. Column sums are drawn in the range
// the adder produces (decimal: 0..72, binary: 0..120, with extremes mixed
// in). The expected result is sum(colsum[i] * R^i), computed here in 128-bit
// integers and cut into NDIG+1 digits of radix R.
module tb_final_correction;
  import bcd_pkg::*;
  localparam int unsigned NDIG = 16;

  add_mode_t             mode;
  colsum_t   [NDIG-1:0]  colsum;
  digit_t    [NDIG:0]    res43, res34;
  int checks = 0, failures = 0;
  int dec_runs = 0, bin_runs = 0;

  final_correction dut43 (.mode(mode), .colsum(colsum), .result(res43));
  final_correction #(.NDIG(NDIG), .SPLIT(SPLIT_THREE_FOUR)) dut34 (
    .mode(mode), .colsum(colsum), .result(res34));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string name, digit_t [NDIG:0] res);
    logic [127:0] total, radix, w;
    radix = (mode == MODE_DEC) ? 128'd10 : 128'd16;
    total = '0;
    w     = 128'd1;
    for (int i = 0; i < NDIG; i++) begin
      total += w * 128'(colsum[i]);
      w     *= radix;
    end
    checks++;
    for (int i = 0; i <= NDIG; i++) begin
      if (128'(res[i]) != total % radix) begin
        failures++;
        $display("FAIL %s mode=%s digit %0d: got %0d expected %0d",
                 name, mode.name(), i, res[i], total % radix);
        break;
      end
      total /= radix;
    end
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int top;
      mode = (t % 2 == 0) ? MODE_DEC : MODE_BIN;
      top  = (mode == MODE_DEC) ? 72 : 120;
      for (int i = 0; i < NDIG; i++) begin
        case (t % 8)
          0, 1:    colsum[i] = colsum_t'(top);
          2, 3:    colsum[i] = colsum_t'($urandom_range(top - 20, top));
          default: colsum[i] = colsum_t'($urandom_range(0, top));
        endcase
      end
      if (mode == MODE_DEC) dec_runs++; else bin_runs++;
      #1;
      check("four-three", res43);
      check("three-four", res34);
    end
    if (dec_runs == 0 || bin_runs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
