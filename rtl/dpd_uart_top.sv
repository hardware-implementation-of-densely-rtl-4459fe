// dpd_uart_top: densely packed decimal compression of decimal numbers typed
// at a serial terminal, plus the fixed-input binary path and a DPD expander.
//
// Serial path, in the order the data flows:
//   rx -> two-flop synchronizer -> uart_rx (16x oversampling, ticks from
//   baud_gen) -> ascii_to_bcd (case map, '0'..'9' to BCD, CR/LF end a
//   number) -> input_appender (three digits to a 12-bit group, zero padding
//   for a short last group) -> dpd_compressor (12 BCD bits to 10 DPD bits,
//   registered) -> output_appender (10-bit words to 8-bit frames) -> uart_tx
//   (same baud_gen ticks) -> tx.
// One baud_gen serves both UART halves. The chain and its operating point
// (50 MHz, 19200 baud, 8N1, 16 samples per bit) follow the source design;
// the synchronizer, the end-of-number characters and the bit packing of the
// output are this design's own.
//
// Fixed-input path: bin_in (BIN_W-bit unsigned binary, at most 999) ->
// bin2bcd -> a second dpd_compressor, enabled by bin_en; bin_bcd shows the
// converter's output directly, bin_dpd the registered DPD word one clock
// after an enabled edge. Expander: exp_dpd_in -> dpd_expander -> exp_bcd_out,
// combinational, for turning DPD words back into digits.
//
// drop pulses if a compressed word had to be discarded because the output
// queue was full (see output_appender). rst_n is synchronous, active low.
module dpd_uart_top
  import dpd_pkg::*;
#(
  parameter int unsigned CLK_HZ     = CLK_HZ_DEF,
  parameter int unsigned BAUD       = BAUD_DEF,
  parameter int unsigned OVERSAMPLE = OVERSAMPLE_DEF,
  parameter int unsigned BIN_W      = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // serial line to and from the terminal (logic level)
  input  logic             rx,
  output logic             tx,
  output logic             drop,
  // fixed-input binary path
  input  logic [BIN_W-1:0] bin_in,
  input  logic             bin_en,
  output bcd3_t            bin_bcd,
  output dpd_t             bin_dpd,
  // expander
  input  dpd_t             exp_dpd_in,
  output bcd3_t            exp_bcd_out
);

  localparam int unsigned BAUD_M = baud_divisor(CLK_HZ, BAUD, OVERSAMPLE);
  localparam int unsigned BAUD_N = $clog2(BAUD_M);

  // ---------------- serial path ----------------
  logic rx_meta, rx_sync;
  always_ff @(posedge clk) begin
    if (!rst_n) {rx_sync, rx_meta} <= 2'b11;
    else        {rx_sync, rx_meta} <= {rx_meta, rx};
  end

  logic              s_tick;
  logic [BAUD_N-1:0] baud_q;
  baud_gen #(.M(BAUD_M), .N(BAUD_N)) u_baud (
    .clk, .rst_n, .tick(s_tick), .q(baud_q)
  );

  logic       rx_done_tick;
  logic [7:0] rx_byte;
  uart_rx #(.DBIT(DBIT_DEF), .SB_TICK(SB_TICK_DEF)) u_rx (
    .clk, .rst_n, .rx(rx_sync), .s_tick, .rx_done_tick, .dout(rx_byte)
  );

  logic       is_digit, is_end;
  bcd_digit_t digit;
  ascii_to_bcd u_map (
    .valid(rx_done_tick), .ascii(rx_byte), .is_digit, .is_end, .digit
  );

  logic  grp_valid, grp_padded, msg_end;
  bcd3_t grp;
  input_appender u_in_app (
    .clk, .rst_n, .digit_valid(is_digit), .digit, .end_in(is_end),
    .grp_valid, .grp, .grp_padded, .msg_end
  );

  dpd_t dpd_word;
  dpd_compressor u_cmp (
    .clk, .enable(grp_valid),
    .a_in(grp[11]), .b_in(grp[10]), .c_in(grp[9]), .d_in(grp[8]),
    .e_in(grp[7]),  .f_in(grp[6]),  .g_in(grp[5]), .h_in(grp[4]),
    .i_in(grp[3]),  .j_in(grp[2]),  .k_in(grp[1]), .m_in(grp[0]),
    .p_out(dpd_word[9]), .q_out(dpd_word[8]), .r_out(dpd_word[7]),
    .s_out(dpd_word[6]), .t_out(dpd_word[5]), .u_out(dpd_word[4]),
    .v_out(dpd_word[3]),
    .w_out(dpd_word[2]), .x_out(dpd_word[1]), .y_out(dpd_word[0])
  );

  // The compressor's word appears one cycle after grp_valid; delay the
  // valid and the end-of-message marker to match.
  logic cmp_valid, cmp_end;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cmp_valid <= 1'b0;
      cmp_end   <= 1'b0;
    end else begin
      cmp_valid <= grp_valid;
      cmp_end   <= msg_end;
    end
  end

  logic       out_ready, byte_valid, tx_ready, tx_done_tick;
  logic [7:0] tx_byte;
  output_appender u_out_app (
    .clk, .rst_n, .in_valid(cmp_valid), .in_word(dpd_word), .flush(cmp_end),
    .in_ready(out_ready), .drop, .byte_valid, .byte_out(tx_byte),
    .byte_ready(tx_ready)
  );

  uart_tx #(.DBIT(DBIT_DEF), .SB_TICK(SB_TICK_DEF)) u_tx (
    .clk, .rst_n, .tx_start(byte_valid && tx_ready), .s_tick, .din(tx_byte),
    .tx_ready, .tx_done_tick, .tx
  );

  // ---------------- fixed-input binary path ----------------
  logic [11:0] bin_digits;
  bin2bcd #(.WIDTH(BIN_W), .DIGITS(3)) u_b2b (
    .bin_in, .bcd_out(bin_digits)
  );
  assign bin_bcd = bin_digits;

  dpd_compressor u_bin_cmp (
    .clk, .enable(bin_en),
    .a_in(bin_digits[11]), .b_in(bin_digits[10]), .c_in(bin_digits[9]), .d_in(bin_digits[8]),
    .e_in(bin_digits[7]),  .f_in(bin_digits[6]),  .g_in(bin_digits[5]), .h_in(bin_digits[4]),
    .i_in(bin_digits[3]),  .j_in(bin_digits[2]),  .k_in(bin_digits[1]), .m_in(bin_digits[0]),
    .p_out(bin_dpd[9]), .q_out(bin_dpd[8]), .r_out(bin_dpd[7]),
    .s_out(bin_dpd[6]), .t_out(bin_dpd[5]), .u_out(bin_dpd[4]),
    .v_out(bin_dpd[3]),
    .w_out(bin_dpd[2]), .x_out(bin_dpd[1]), .y_out(bin_dpd[0])
  );

  // ---------------- expander ----------------
  dpd_expander u_exp (.dpd_in(exp_dpd_in), .bcd_out(exp_bcd_out));

  initial assert (BIN_W >= 1 && BIN_W <= 9)
    else $error("dpd_uart_top: BIN_W=%0d; three BCD digits hold at most 9 bits", BIN_W);

endmodule
