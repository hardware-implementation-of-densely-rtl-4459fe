// tb_dpd_expander: checks the DPD-to-BCD expander. Every one of the 1000
// canonical DPD codes (made by the encoding-table model) must expand to its
// digits; the worked examples are checked explicitly; and every one of the
// 1024 ten-bit codes must expand to three valid BCD digits.
module tb_dpd_expander;
  import dpd_ref_pkg::*;

  logic [9:0]  dpd;
  logic [11:0] bcd;
  int checks = 0, failures = 0;

  dpd_expander dut (.dpd_in(dpd), .bcd_out(bcd));

  task automatic check(string what, logic [11:0] got, logic [11:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dpd = 10'b000_101_1_111; #1; check("099", bcd, 12'h099);
    dpd = 10'b101_101_0_101; #1; check("555", bcd, 12'h555);
    dpd = 10'b001_111_1_111; #1; check("999", bcd, 12'h999);
    dpd = 10'b000_000_1_001; #1; check("009", bcd, 12'h009);
    for (int n = 0; n < 1000; n++) begin
      dpd = dpd_encode(bcd_of(n)); #1;
      check($sformatf("%03d", n), bcd, bcd_of(n));
    end
    for (int c = 0; c < 1024; c++) begin
      dpd = 10'(c); #1;
      checks++;
      if (bcd[11:8] > 9 || bcd[7:4] > 9 || bcd[3:0] > 9) begin
        failures++;
        $display("FAIL code %b gives non-BCD %h", dpd, bcd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
