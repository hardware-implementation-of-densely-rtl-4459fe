// input_appender: packs BCD digits, one at a time, into 12-bit groups of
// three for the compressor.
//
// Digits enter with digit_valid and are appended behind the ones already
// held, so the first digit of a group ends up in the top nibble. The third
// digit completes the group: grp_valid pulses with the group on grp. If the
// number ends (end_in) while one or two digits are held, the group is
// completed with zero nibbles behind them and sent with grp_padded set:
// "5" leaves as 5,0,0 and "42" as 4,2,0. msg_end repeats end_in in the same
// cycle as that last group, or alone if no digits were pending, so that the
// stages behind can close the message. Packing into 12 bits and padding a
// short group with zeros follow the source design; padding behind the
// digits (rather than in front), the end marker and the synchronous
// active-low reset are this design's own reading.
//
// Timing: outputs are registered, one cycle after the digit or end that
// caused them. digit_valid and end_in must not be high together.
module input_appender
  import dpd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       digit_valid,
  input  bcd_digit_t digit,
  input  logic       end_in,
  output logic       grp_valid,
  output bcd3_t      grp,
  output logic       grp_padded,
  output logic       msg_end
);

  logic [7:0] held;    // up to two digits, the older one in [7:4]
  logic [1:0] count;   // digits held, 0..2

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held       <= '0;
      count      <= '0;
      grp_valid  <= 1'b0;
      grp        <= '0;
      grp_padded <= 1'b0;
      msg_end    <= 1'b0;
    end else begin
      grp_valid  <= 1'b0;
      grp_padded <= 1'b0;
      msg_end    <= 1'b0;
      if (digit_valid) begin
        if (count == 2'd2) begin
          grp       <= {held, digit};
          grp_valid <= 1'b1;
          count     <= '0;
          held      <= '0;
        end else begin
          held  <= {held[3:0], digit};
          count <= count + 1'b1;
        end
      end else if (end_in) begin
        msg_end <= 1'b1;
        if (count == 2'd1) begin
          grp        <= {held[3:0], 8'h00};
          grp_valid  <= 1'b1;
          grp_padded <= 1'b1;
        end else if (count == 2'd2) begin
          grp        <= {held, 4'h0};
          grp_valid  <= 1'b1;
          grp_padded <= 1'b1;
        end
        count <= '0;
        held  <= '0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(digit_valid && end_in))
    else $error("input_appender: digit and end in the same cycle");

endmodule
