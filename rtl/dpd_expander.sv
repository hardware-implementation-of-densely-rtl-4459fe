// dpd_expander: one 10-bit densely packed decimal word in, three BCD digits out.
//
// The inverse of dpd_compressor, written as the decoding table of DPD:
// v = 0 means all three digits are small (0-7) and their low three bits are
// pqr, stu, wxy. With v = 1, w and x say which single digit is large, and
// w = x = 1 hands the choice over to s and t, which then tell which two or
// all three digits are large. A large digit is 100 followed by its low bit
// (r, u or y). Purely combinational; the 24 redundant DPD codes (v = 1,
// w = x = 1, s = t = 1 with p or q set) decode as the table says, with
// p and q ignored.
//
// Interface: dpd_in = {p,q,r,s,t,u,v,w,x,y}, bcd_out = {abcd, efgh, ijkm}.
module dpd_expander
  import dpd_pkg::*;
(
  input  dpd_t  dpd_in,
  output bcd3_t bcd_out
);

  logic p, q, r, s, t, u, v, w, x, y;
  assign {p, q, r, s, t, u, v, w, x, y} = dpd_in;

  bcd_digit_t d0, d1, d2;   // first, second, third digit

  always_comb begin
    if (!v) begin
      d0 = {1'b0, p, q, r};  d1 = {1'b0, s, t, u};  d2 = {1'b0, w, x, y};
    end else begin
      unique case ({w, x})
        2'b00: begin d0 = {1'b0, p, q, r}; d1 = {1'b0, s, t, u}; d2 = {3'b100, y}; end
        2'b01: begin d0 = {1'b0, p, q, r}; d1 = {3'b100, u}; d2 = {1'b0, s, t, y}; end
        2'b10: begin d0 = {3'b100, r}; d1 = {1'b0, s, t, u}; d2 = {1'b0, p, q, y}; end
        default: begin
          unique case ({s, t})
            2'b00: begin d0 = {3'b100, r}; d1 = {3'b100, u}; d2 = {1'b0, p, q, y}; end
            2'b01: begin d0 = {3'b100, r}; d1 = {1'b0, p, q, u}; d2 = {3'b100, y}; end
            2'b10: begin d0 = {1'b0, p, q, r}; d1 = {3'b100, u}; d2 = {3'b100, y}; end
            default: begin d0 = {3'b100, r}; d1 = {3'b100, u}; d2 = {3'b100, y}; end
          endcase
        end
      endcase
    end
  end

  assign bcd_out = {d0, d1, d2};

endmodule
