// tb_dpd_uart_top: end-to-end test of the whole system at its default
// parameters (50 MHz clock, 19200 baud, 16x oversampling).
//
// A host model types decimal numbers as 8N1 frames on rx, back to back at
// 19200 baud, each number ended by CR (one also by CR LF, one preceded by a
// letter that must be ignored). A line monitor decodes the frames on tx. The
// expected byte stream is built from the typed text alone: digits grouped by
// three in typing order, a short last group filled with zero digits, each
// group encoded with the DPD table model, the 10-bit words concatenated MSB
// first and, at each end of number, zero bits added up to a byte boundary.
// The fixed-input path is checked on all 256 binary inputs, the expander on
// all 1000 DPD codes. Mechanisms counted, each of which must happen: full
// groups, padded groups of one and of two digits, an end with no digits
// pending, a flush that pads, ignored characters, a byte waiting for a busy
// transmitter. A drop of a compressed word counts as a failure.
module tb_dpd_uart_top;
  import dpd_ref_pkg::*;

  localparam int HOST_BIT = 2604;          // 50 MHz / 19200
  localparam int TX_BIT   = 16 * 163;      // bit time of the design's ticks

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic        rx = 1'b1, tx, drop;
  logic [7:0]  bin_in = '0;
  logic        bin_en = 0;
  logic [11:0] bin_bcd, exp_bcd_out;
  logic [9:0]  bin_dpd, exp_dpd_in = '0;
  int checks = 0, failures = 0;

  dpd_uart_top dut (.clk, .rst_n, .rx, .tx, .drop, .bin_in, .bin_en, .bin_bcd,
                    .bin_dpd, .exp_dpd_in, .exp_bcd_out);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- expected stream model ----------------
  bit         exp_bits[$];
  logic [7:0] exp_bytes[$];
  int n_full_exp = 0, n_pad1_exp = 0, n_pad2_exp = 0, n_flush_pad = 0;

  task automatic model_text(string txt);
    logic [11:0] acc;
    int k;
    acc = '0; k = 0;
    for (int c = 0; c < txt.len(); c++) begin
      byte ch;
      ch = txt[c];
      if (ch >= "0" && ch <= "9") begin
        acc = {acc[7:0], 4'(ch - "0")}; k++;
        if (k == 3) begin
          logic [9:0] w;
          w = dpd_encode(acc);
          for (int b = 9; b >= 0; b--) exp_bits.push_back(w[b]);
          k = 0; acc = '0; n_full_exp++;
        end
      end else if (ch == 8'h0D || ch == 8'h0A) begin
        if (k > 0) begin
          logic [9:0] w;
          if (k == 1) begin w = dpd_encode({acc[3:0], 8'h00}); n_pad1_exp++; end
          else        begin w = dpd_encode({acc[7:0], 4'h0});  n_pad2_exp++; end
          for (int b = 9; b >= 0; b--) exp_bits.push_back(w[b]);
        end
        k = 0; acc = '0;
        if (exp_bits.size() % 8 != 0) n_flush_pad++;
        while (exp_bits.size() % 8 != 0) exp_bits.push_back(1'b0);
      end
      while (exp_bits.size() >= 8) begin
        logic [7:0] by;
        for (int b = 7; b >= 0; b--) by[b] = exp_bits.pop_front();
        exp_bytes.push_back(by);
      end
    end
  endtask

  // ---------------- host transmitter ----------------
  task automatic send_char(byte ch);
    logic [9:0] f;
    f = {1'b1, ch, 1'b0};
    for (int k = 0; k < 10; k++) begin
      rx = f[k];
      repeat (HOST_BIT) @(posedge clk);
    end
  endtask

  task automatic send_text(string txt);
    model_text(txt);
    for (int c = 0; c < txt.len(); c++) send_char(txt[c]);
  endtask

  // ---------------- host receiver ----------------
  logic [7:0] got_bytes[$];
  initial begin
    forever begin
      logic [9:0] f;
      @(negedge tx);
      if (!rst_n) continue;
      repeat (TX_BIT / 2) @(posedge clk);
      f[0] = tx;
      for (int k = 1; k < 10; k++) begin
        repeat (TX_BIT) @(posedge clk);
        f[k] = tx;
      end
      check("tx start bit", f[0] == 1'b0);
      check("tx stop bit", f[9] == 1'b1);
      got_bytes.push_back(f[8:1]);
    end
  end

  // ---------------- mechanism counters (internal probes) ----------------
  int n_full = 0, n_pad = 0, n_end_only = 0, n_ignored = 0, n_tx_wait = 0, n_drop = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.grp_valid && !dut.grp_padded) n_full++;
    if (dut.grp_valid && dut.grp_padded) n_pad++;
    if (dut.msg_end && !dut.grp_valid) n_end_only++;
    if (dut.rx_done_tick && !dut.is_digit && !dut.is_end) n_ignored++;
    if (dut.byte_valid && !dut.tx_ready) n_tx_wait++;
    if (drop) n_drop++;
  end

  initial begin
    #100_000_000;   // 5 M cycles
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    #1 rst_n = 1;
    // fixed-input path: binary -> BCD -> DPD
    for (int v = 0; v < 256; v++) begin
      bin_in = 8'(v); bin_en = 1;
      #1 check($sformatf("bin_bcd %0d", v), bin_bcd == bcd_of(v));
      @(posedge clk); #1;
      check($sformatf("bin_dpd %0d", v), bin_dpd == dpd_encode(bcd_of(v)));
    end
    bin_en = 0; bin_in = 8'd7;
    @(posedge clk); #1;
    check("bin_dpd holds", bin_dpd == dpd_encode(bcd_of(255)));
    // expander
    for (int n = 0; n < 1000; n++) begin
      exp_dpd_in = dpd_encode(bcd_of(n)); #1;
      check($sformatf("expander %0d", n), exp_bcd_out == bcd_of(n));
    end
    // serial path
    repeat (HOST_BIT) @(posedge clk);
    send_text("243\r");
    send_text("99955\r");
    send_text("1\r\n");
    send_text("x12\r");
    send_text("555005009099\r");
    send_text("8\r");
    send_text("1234567\r");
    // let the last bytes leave
    repeat (40 * TX_BIT) @(posedge clk);
    check($sformatf("byte count %0d expected %0d", got_bytes.size(), exp_bytes.size()),
          got_bytes.size() == exp_bytes.size());
    for (int i = 0; i < exp_bytes.size() && i < got_bytes.size(); i++)
      check($sformatf("byte %0d got %h expected %h", i, got_bytes[i], exp_bytes[i]),
            got_bytes[i] == exp_bytes[i]);
    check($sformatf("full groups %0d expected %0d", n_full, n_full_exp), n_full == n_full_exp);
    check($sformatf("padded groups %0d expected %0d", n_pad, n_pad1_exp + n_pad2_exp),
          n_pad == n_pad1_exp + n_pad2_exp);
    check("no word dropped", n_drop == 0);
    $display("mechanisms: full=%0d pad1=%0d pad2=%0d end_only=%0d flush_pad=%0d ignored=%0d tx_wait=%0d",
             n_full, n_pad1_exp, n_pad2_exp, n_end_only, n_flush_pad, n_ignored, n_tx_wait);
    check("full group happened",   n_full > 0);
    check("1-digit pad happened",  n_pad1_exp > 0);
    check("2-digit pad happened",  n_pad2_exp > 0);
    check("bare end happened",     n_end_only > 0);
    check("flush pad happened",    n_flush_pad > 0);
    check("ignored char happened", n_ignored > 0);
    check("tx wait happened",      n_tx_wait > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
