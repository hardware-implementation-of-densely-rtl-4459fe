// tb_output_appender: random DPD words, flushes and byte_ready stalls into
// the appender, checked against a bit-queue model kept by the testbench:
// each byte must be the next 8 bits of the words sent (MSB first), a flush
// must pad with zeros to a byte boundary, byte_valid and in_ready must
// follow the queue fill, and a word offered while in_ready is low must be
// dropped with a drop pulse. Counts that flush padding, back-to-back bytes,
// stalls and drops all happened.
module tb_output_appender;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic       in_valid = 0, flush = 0, byte_ready = 0;
  logic [9:0] in_word = '0;
  logic       in_ready, drop, byte_valid;
  logic [7:0] byte_out;
  int checks = 0, failures = 0;

  output_appender dut (.clk, .rst_n, .in_valid, .in_word, .flush, .in_ready,
                       .drop, .byte_valid, .byte_out, .byte_ready);

  bit model[$];
  bit exp_drop = 0;
  int n_bytes = 0, n_pads = 0, n_drops = 0, n_stalls = 0, n_b2b = 0;
  bit popped_last = 0;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      check("drop pulse", drop == exp_drop);
      exp_drop = 0;
      check($sformatf("byte_valid with %0d bits", model.size()), byte_valid == (model.size() >= 8));
      check($sformatf("in_ready with %0d bits", model.size()), in_ready == (model.size() <= 14));
      if (byte_valid && !byte_ready) n_stalls++;
      if (byte_valid && byte_ready) begin
        logic [7:0] e;
        for (int k = 0; k < 8; k++) e[7 - k] = model.pop_front();
        check($sformatf("byte %h expected %h", byte_out, e), byte_out == e);
        n_bytes++;
        if (popped_last) n_b2b++;
        popped_last = 1;
      end else popped_last = 0;
      if (in_valid) begin
        if (in_ready) for (int k = 9; k >= 0; k--) model.push_back(in_word[k]);
        else begin exp_drop = 1; n_drops++; end
      end
      if (flush && (model.size() % 8) != 0) begin
        n_pads++;
        while ((model.size() % 8) != 0) model.push_back(1'b0);
      end
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      // mostly respect in_ready; now and then offer a word regardless
      in_valid   = ($urandom_range(0, 3) == 0) && (in_ready || $urandom_range(0, 20) == 0);
      in_word    = 10'($urandom);
      flush      = ($urandom_range(0, 9) == 0);
      byte_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
    end
    in_valid = 0; flush = 1; byte_ready = 1;
    @(posedge clk); #1;
    flush = 0;
    repeat (10) @(posedge clk);
    #1;
    check("queue drained", model.size() == 0 && !byte_valid);
    check($sformatf("mechanisms: bytes %0d pads %0d drops %0d stalls %0d b2b %0d",
                    n_bytes, n_pads, n_drops, n_stalls, n_b2b),
          n_bytes > 0 && n_pads > 0 && n_drops > 0 && n_stalls > 0 && n_b2b > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
