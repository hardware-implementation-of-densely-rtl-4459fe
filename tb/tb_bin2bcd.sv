// tb_bin2bcd: checks the shift-and-add-3 converter against division.
// The 8-bit default size is checked on all 256 inputs (including the worked
// example 11110011 = 243), a 10-bit instance on all 1024 inputs and a 20-bit
// instance on random inputs and on 0xEDCEE.
module tb_bin2bcd;
  logic [7:0]  b8;   logic [11:0] d8;
  logic [9:0]  b10;  logic [15:0] d10;
  logic [19:0] b20;  logic [27:0] d20;
  int checks = 0, failures = 0;

  bin2bcd                 dut8  (.bin_in(b8),  .bcd_out(d8));
  bin2bcd #(.WIDTH(10))   dut10 (.bin_in(b10), .bcd_out(d10));
  bin2bcd #(.WIDTH(20))   dut20 (.bin_in(b20), .bcd_out(d20));

  function automatic logic [27:0] to_bcd(int unsigned v);
    logic [27:0] r = '0;
    for (int k = 0; k < 7; k++) begin
      r[4*k +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic check(string what, logic [27:0] got, logic [27:0] exp);
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
    b10 = '0; b20 = '0;
    b8 = 8'b1111_0011; #1; check("243", 28'(d8), 28'h243);
    b8 = 8'hEE;        #1; check("238", 28'(d8), 28'h238);
    for (int v = 0; v < 256; v++) begin
      b8 = 8'(v); #1; check($sformatf("8b %0d", v), 28'(d8), to_bcd(v));
    end
    for (int v = 0; v < 1024; v++) begin
      b10 = 10'(v); #1; check($sformatf("10b %0d", v), 28'(d10), to_bcd(v));
    end
    b20 = 20'hEDCEE; #1; check("974062", d20, 28'h974062);
    for (int t = 0; t < 2000; t++) begin
      b20 = 20'($urandom); #1; check($sformatf("20b %0d", b20), d20, to_bcd(b20));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
