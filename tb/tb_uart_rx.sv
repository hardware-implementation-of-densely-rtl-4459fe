// tb_uart_rx: drives 8N1 frames into the receiver with a sampling tick every
// TICK_DIV clocks (16 ticks per nominal bit) and checks the received bytes,
// one rx_done_tick per frame, and that the done pulse comes 9.5 bit times
// after the start edge (8 ticks to mid start bit, 8 x 16 data, 16 stop),
// within one tick. Frames are also sent 3 % slow and 3 % fast, and with
// idle gaps of random length.
module tb_uart_rx;
  localparam int TICK_DIV = 5;
  localparam int BIT_CLKS = 16 * TICK_DIV;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic       rx = 1'b1, s_tick, rx_done_tick;
  logic [7:0] dout;
  int tick_cnt = 0;
  int checks = 0, failures = 0;
  int cyc = 0;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    tick_cnt <= (tick_cnt == TICK_DIV - 1) ? 0 : tick_cnt + 1;
  end
  assign s_tick = (tick_cnt == TICK_DIV - 1);

  uart_rx dut (.clk, .rst_n, .rx, .s_tick, .rx_done_tick, .dout);

  logic [7:0] sent_q[$];
  int         start_q[$];
  int         done_count = 0;

  // monitor
  always @(posedge clk) begin
    if (rst_n && rx_done_tick) begin
      logic [7:0] exp;
      int st, dt;
      done_count++;
      checks++;
      if (sent_q.size() == 0) begin
        failures++; $display("FAIL unexpected byte %h", dout);
      end else begin
        exp = sent_q.pop_front();
        st  = start_q.pop_front();
        if (dout !== exp) begin failures++; $display("FAIL got %h expected %h", dout, exp); end
        dt = cyc - st;
        if (st >= 0) checks++;
        if (st >= 0) if (dt < (19 * BIT_CLKS) / 2 - TICK_DIV - 2 || dt > (19 * BIT_CLKS) / 2 + TICK_DIV + 2) begin
          failures++; $display("FAIL done after %0d clocks, nominal %0d", dt, 19 * BIT_CLKS / 2);
        end
      end
    end
  end

  task automatic send(logic [7:0] d, int bit_clks);
    logic [9:0] frame;
    frame = {1'b1, d, 1'b0};
    sent_q.push_back(d);
    start_q.push_back(cyc);
    for (int k = 0; k < 10; k++) begin
      rx = frame[k];
      repeat (bit_clks) @(posedge clk);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_sent = 0;
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    send(8'h55, BIT_CLKS); n_sent++;
    send(8'h00, BIT_CLKS); n_sent++;
    send(8'hFF, BIT_CLKS); n_sent++;
    send(8'h35, BIT_CLKS); n_sent++;
    for (int t = 0; t < 40; t++) begin
      send(8'($urandom), BIT_CLKS); n_sent++;
      repeat ($urandom_range(0, 3 * BIT_CLKS)) @(posedge clk);
    end
    // rate tolerance: 3 % slow and fast; these frames are not timed
    for (int t = 0; t < 10; t++) begin
      sent_q.push_back(8'($urandom));
      start_q.push_back(-1);
      begin
        logic [9:0] frame;
        int bc;
        frame = {1'b1, sent_q[$], 1'b0};
        bc = (t % 2) ? BIT_CLKS * 103 / 100 : BIT_CLKS * 97 / 100;
        for (int k = 0; k < 10; k++) begin rx = frame[k]; repeat (bc) @(posedge clk); end
      end
      n_sent++;
    end
    repeat (4 * BIT_CLKS) @(posedge clk);
    checks++;
    if (done_count != n_sent) begin failures++; $display("FAIL %0d frames received of %0d", done_count, n_sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
