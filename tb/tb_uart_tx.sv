// tb_uart_tx: sends bytes through the transmitter with a sampling tick every
// TICK_DIV clocks and decodes the line independently: it waits for the
// falling start edge, samples the middle of each of the ten bit periods and
// checks start bit, data (LSB first) and stop bit. It also checks that
// each data bit lasts 16 ticks, that tx_ready is low while a frame is sent,
// that tx_done_tick pulses once per frame, and that the line idles high.
module tb_uart_tx;
  localparam int TICK_DIV = 5;
  localparam int BIT_CLKS = 16 * TICK_DIV;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic       s_tick, tx_start = 0, tx_ready, tx_done_tick, tx;
  logic [7:0] din = '0;
  int tick_cnt = 0;
  int checks = 0, failures = 0;

  always_ff @(posedge clk) tick_cnt <= (tick_cnt == TICK_DIV - 1) ? 0 : tick_cnt + 1;
  assign s_tick = (tick_cnt == TICK_DIV - 1);

  uart_tx dut (.clk, .rst_n, .tx_start, .s_tick, .din, .tx_ready, .tx_done_tick, .tx);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [7:0] sent_q[$];
  int frames = 0, dones = 0;

  always @(posedge clk) if (rst_n && tx_done_tick) dones++;

  // line decoder
  initial begin
    forever begin
      logic [9:0] f;
      int t0, t1;
      @(negedge tx);
      if (!rst_n) continue;
      // sample the middle of the start bit and of each following bit
      repeat (BIT_CLKS / 2) @(posedge clk);
      f[0] = tx;
      for (int k = 1; k < 10; k++) begin
        repeat (BIT_CLKS) @(posedge clk);
        f[k] = tx;
      end
      frames++;
      check("start bit", f[0] == 1'b0);
      check("stop bit",  f[9] == 1'b1);
      if (sent_q.size() == 0) check("unexpected frame", 0);
      else begin
        logic [7:0] e;
        e = sent_q.pop_front();
        check($sformatf("data %h expected %h", f[8:1], e), f[8:1] == e);
      end
    end
  end

  // bit length: time between the edges of an alternating pattern
  int edge_t[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [7:0] d);
    while (!tx_ready) @(posedge clk);
    #1;
    din = d; tx_start = 1'b1;
    sent_q.push_back(d);
    @(posedge clk); #1;
    tx_start = 1'b0;
    check("busy after start", !tx_ready);
    din = 8'($urandom);   // the frame must not follow din after the start
  endtask

  initial begin
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (20) @(posedge clk);
    check("idle high", tx == 1'b1);
    // 0x55 gives a 0101... line: every edge must be 16 ticks apart
    fork
      send(8'h55);
      begin
        int last;
        @(negedge tx);                 // start of frame
        last = cyc;
        for (int k = 0; k < 9; k++) begin
          @(tx);
          if (k > 0) check($sformatf("bit length %0d", cyc - last), cyc - last == BIT_CLKS);
          last = cyc;
        end
      end
    join
    for (int t = 0; t < 30; t++) begin
      send(8'($urandom));
      if ($urandom_range(0, 1)) repeat ($urandom_range(1, 2 * BIT_CLKS)) @(posedge clk);
    end
    while (!tx_ready) @(posedge clk);
    repeat (2 * BIT_CLKS) @(posedge clk);
    check($sformatf("frames %0d of 31", frames), frames == 31);
    check($sformatf("done ticks %0d of 31", dones), dones == 31);
    check("idle high at end", tx == 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
