// tb_baud_gen: checks that the mod-M counter at its default M = 163 gives
// exactly one tick every 163 clocks, that the count wraps from M-1 to 0,
// and that a small instance (M = 5) does the same.
module tb_baud_gen;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic       tick, tick5;
  logic [7:0] q;
  logic [2:0] q5;
  int checks = 0, failures = 0;

  baud_gen                   dut  (.clk, .rst_n, .tick, .q);
  baud_gen #(.M(5), .N(3))   dut5 (.clk, .rst_n, .tick(tick5), .q(q5));

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last = -1, last5 = -1, ticks = 0, ticks5 = 0, cyc = 0;
  int prev_q = 0;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (cyc = 0; cyc < 163 * 20 + 5; cyc++) begin
      @(posedge clk); #1;
      if (tick) begin
        checks++;
        if (q != 8'd162) begin failures++; $display("FAIL tick at q=%0d", q); end
        if (last >= 0) begin
          checks++;
          if (cyc - last != 163) begin failures++; $display("FAIL tick period %0d", cyc - last); end
        end
        last = cyc; ticks++;
      end
      if (prev_q == 162) begin
        checks++;
        if (q != 0) begin failures++; $display("FAIL no wrap, q=%0d", q); end
      end
      prev_q = q;
      if (tick5) begin
        if (last5 >= 0) begin
          checks++;
          if (cyc - last5 != 5) begin failures++; $display("FAIL M=5 period %0d", cyc - last5); end
        end
        last5 = cyc; ticks5++;
      end
    end
    checks++;
    if (ticks != 20) begin failures++; $display("FAIL %0d ticks, expected 20", ticks); end
    checks++;
    if (ticks5 < 600) begin failures++; $display("FAIL %0d M=5 ticks", ticks5); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
