// tb_input_appender: feeds random runs of digits, each ended by an end
// marker, into the appender and compares every group it sends with the
// digits the testbench grouped itself: full groups of three, and the last
// one or two digits of a run followed by zero nibbles and flagged padded.
// Also checks one msg_end per run and the one-cycle latency.
module tb_input_appender;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic        digit_valid = 0, end_in = 0;
  logic [3:0]  digit = '0;
  logic        grp_valid, grp_padded, msg_end;
  logic [11:0] grp;
  int checks = 0, failures = 0;

  input_appender dut (.clk, .rst_n, .digit_valid, .digit, .end_in,
                      .grp_valid, .grp, .grp_padded, .msg_end);

  typedef struct { logic [11:0] g; logic padded; } exp_t;
  exp_t exp_q[$];
  int   ends_exp = 0, ends_got = 0, n_full = 0, n_pad1 = 0, n_pad2 = 0;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && msg_end) ends_got++;
    if (rst_n && grp_valid) begin
      if (exp_q.size() == 0) check("unexpected group", 0);
      else begin
        exp_t e;
        e = exp_q.pop_front();
        check($sformatf("group %h expected %h", grp, e.g), grp == e.g);
        check("padded flag", grp_padded == e.padded);
      end
    end
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int run = 0; run < 300; run++) begin
      int len;
      logic [11:0] acc;
      int k;
      len = $urandom_range(0, 10);
      acc = '0;
      k = 0;
      for (int dg = 0; dg < len; dg++) begin
        logic [3:0] d;
        d = 4'($urandom_range(0, 9));
        acc = {acc[7:0], d}; k++;
        digit = d; digit_valid = 1;
        @(posedge clk); #1;
        digit_valid = 0;
        if (k == 3) begin
          exp_q.push_back('{acc, 1'b0}); n_full++; k = 0; acc = '0;
          check("latency", grp_valid && grp == exp_q[$].g);
        end
        repeat ($urandom_range(0, 2)) @(posedge clk);
        #1;
      end
      if (k == 1) begin exp_q.push_back('{{acc[3:0], 8'h00}, 1'b1}); n_pad1++; end
      if (k == 2) begin exp_q.push_back('{{acc[7:0], 4'h0}, 1'b1}); n_pad2++; end
      end_in = 1; ends_exp++;
      @(posedge clk); #1;
      end_in = 0;
      check("msg_end latency", msg_end);
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1;
    end
    repeat (3) @(posedge clk);
    check("all groups seen", exp_q.size() == 0);
    check($sformatf("msg_end %0d of %0d", ends_got, ends_exp), ends_got == ends_exp);
    check("all group kinds happened", n_full > 0 && n_pad1 > 0 && n_pad2 > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
