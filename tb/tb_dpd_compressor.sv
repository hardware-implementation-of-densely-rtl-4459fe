// tb_dpd_compressor: checks the BCD-to-DPD compressor on all 1000 digit
// triples against the encoding-table model, on the worked examples
// (005, 009, 055, 099, 555, 999), its one-clock latency and that its
// outputs hold while enable is low.
module tb_dpd_compressor;
  import dpd_ref_pkg::*;

  logic clk = 0;
  always #10 clk = ~clk;   // 50 MHz

  logic enable;
  logic [11:0] bcd;
  logic [9:0]  dpd;
  int checks = 0, failures = 0;

  dpd_compressor dut (
    .clk, .enable,
    .a_in(bcd[11]), .b_in(bcd[10]), .c_in(bcd[9]), .d_in(bcd[8]),
    .e_in(bcd[7]),  .f_in(bcd[6]),  .g_in(bcd[5]), .h_in(bcd[4]),
    .i_in(bcd[3]),  .j_in(bcd[2]),  .k_in(bcd[1]), .m_in(bcd[0]),
    .p_out(dpd[9]), .q_out(dpd[8]), .r_out(dpd[7]),
    .s_out(dpd[6]), .t_out(dpd[5]), .u_out(dpd[4]), .v_out(dpd[3]),
    .w_out(dpd[2]), .x_out(dpd[1]), .y_out(dpd[0])
  );

  task automatic check(string what, logic [9:0] got, logic [9:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic apply(logic [11:0] x);
    bcd = x; enable = 1'b1;
    @(posedge clk); #1;
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 0; bcd = '0;
    @(posedge clk); #1;
    // worked examples: decimal, expected DPD
    apply(12'h005); check("005", dpd, 10'b000_000_0_101);
    apply(12'h009); check("009", dpd, 10'b000_000_1_001);
    apply(12'h055); check("055", dpd, 10'b000_101_0_101);
    apply(12'h099); check("099", dpd, 10'b000_101_1_111);
    apply(12'h555); check("555", dpd, 10'b101_101_0_101);
    apply(12'h999); check("999", dpd, 10'b001_111_1_111);
    // exhaustive against the table model
    for (int n = 0; n < 1000; n++) begin
      apply(bcd_of(n));
      check($sformatf("%03d", n), dpd, dpd_encode(bcd_of(n)));
    end
    // latency: the word changes only at the clock edge
    apply(12'h123);
    bcd = 12'h987; #3;
    check("before edge", dpd, dpd_encode(12'h123));
    @(posedge clk); #1;
    check("after edge", dpd, dpd_encode(12'h987));
    // enable low holds the last word
    enable = 0; bcd = 12'h456;
    repeat (3) @(posedge clk); #1;
    check("hold", dpd, dpd_encode(12'h987));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
