// ascii_to_bcd: case map from a received ASCII character to a BCD digit.
//
// The characters '0'..'9' (8'h30..8'h39) map to the BCD digits 0..9 and
// raise is_digit. Carriage return (8'h0D) and line feed (8'h0A), which a
// terminal sends for the Enter key, raise is_end: they mark the end of the
// decimal number being typed. Any other character raises neither and is
// ignored downstream. The digit map follows the source design; the choice
// of end markers and ignoring other characters are this design's own.
// Purely combinational; valid qualifies the character.
module ascii_to_bcd
  import dpd_pkg::*;
(
  input  logic       valid,
  input  logic [7:0] ascii,
  output logic       is_digit,
  output logic       is_end,
  output bcd_digit_t digit
);

  always_comb begin
    digit    = '0;
    is_digit = 1'b0;
    is_end   = 1'b0;
    case (ascii)
      8'h30: begin digit = 4'd0; is_digit = valid; end
      8'h31: begin digit = 4'd1; is_digit = valid; end
      8'h32: begin digit = 4'd2; is_digit = valid; end
      8'h33: begin digit = 4'd3; is_digit = valid; end
      8'h34: begin digit = 4'd4; is_digit = valid; end
      8'h35: begin digit = 4'd5; is_digit = valid; end
      8'h36: begin digit = 4'd6; is_digit = valid; end
      8'h37: begin digit = 4'd7; is_digit = valid; end
      8'h38: begin digit = 4'd8; is_digit = valid; end
      8'h39: begin digit = 4'd9; is_digit = valid; end
      8'h0D, 8'h0A: is_end = valid;
      default: ;
    endcase
  end

endmodule
