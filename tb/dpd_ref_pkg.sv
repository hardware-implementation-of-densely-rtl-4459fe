// dpd_ref_pkg: reference models for the testbenches, written independently
// of the RTL. dpd_encode follows the DPD encoding table row by row (cases of
// the three digit MSBs a, e, i); bcd_of turns an integer 0..999 into three
// BCD digits by division.
package dpd_ref_pkg;

  function automatic logic [11:0] bcd_of(int unsigned v);
    return {4'(v / 100), 4'((v / 10) % 10), 4'(v % 10)};
  endfunction

  function automatic logic [9:0] dpd_encode(logic [11:0] bcd);
    logic a, b, c, d, e, f, g, h, i, j, k, m;
    logic [2:0] pqr, stu, wxy;
    logic v;
    {a, b, c, d, e, f, g, h, i, j, k, m} = bcd;
    v = 1'b1;
    case ({a, e, i})
      3'b000: begin pqr = {b, c, d}; stu = {f, g, h}; v = 1'b0; wxy = {j, k, m}; end
      3'b001: begin pqr = {b, c, d}; stu = {f, g, h}; wxy = {2'b00, m}; end
      3'b010: begin pqr = {b, c, d}; stu = {j, k, h}; wxy = {2'b01, m}; end
      3'b100: begin pqr = {j, k, d}; stu = {f, g, h}; wxy = {2'b10, m}; end
      3'b110: begin pqr = {j, k, d}; stu = {2'b00, h}; wxy = {2'b11, m}; end
      3'b101: begin pqr = {f, g, d}; stu = {2'b01, h}; wxy = {2'b11, m}; end
      3'b011: begin pqr = {b, c, d}; stu = {2'b10, h}; wxy = {2'b11, m}; end
      default: begin pqr = {2'b00, d}; stu = {2'b11, h}; wxy = {2'b11, m}; end
    endcase
    return {pqr, stu, v, wxy};
  endfunction

endpackage
