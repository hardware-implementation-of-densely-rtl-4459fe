// tb_ascii_to_bcd: all 256 characters through the case map, with valid
// high and low: digits give their value, CR and LF mark an end, the rest
// nothing.
module tb_ascii_to_bcd;
  logic       valid;
  logic [7:0] ascii;
  logic       is_digit, is_end;
  logic [3:0] digit;
  int checks = 0, failures = 0;

  ascii_to_bcd dut (.valid, .ascii, .is_digit, .is_end, .digit);

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int vv = 0; vv < 2; vv++) begin
      for (int c = 0; c < 256; c++) begin
        logic exp_dig, exp_end;
        valid = vv[0]; ascii = 8'(c); #1;
        exp_dig = valid && (c >= 48 && c <= 57);
        exp_end = valid && (c == 13 || c == 10);
        checks++;
        if (is_digit !== exp_dig || is_end !== exp_end ||
            (exp_dig && digit !== 4'(c - 48))) begin
          failures++;
          $display("FAIL char %0d valid %0d: digit %0d/%0d end %0d", c, valid, is_digit, digit, is_end);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
