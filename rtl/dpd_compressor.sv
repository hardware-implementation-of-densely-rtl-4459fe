// dpd_compressor: three BCD digits in, one 10-bit densely packed decimal word out.
//
// The digits are abcd (first, a = MSB), efgh and ijkm. The three digit MSBs
// a, e, i tell which digits are large (8 or 9); the DPD word pqr stu v wxy
// keeps the low three bits of every small digit and only the low bit of a
// large one, and v/w/x say where the large digits are. Every output bit is
// a sum of at most four products of inputs and inverted inputs, so the
// encoder is two gate levels behind the inverters; the sum-of-products form
// per output bit and the port names follow the source design, as does
// registering the outputs on the clock edge when enable is high.
// There is no reset: the outputs hold their last value until the first
// enabled edge.
//
// Timing: one clock of latency. On a rising clk edge with enable = 1 the
// word for the inputs present at that edge appears on p_out..y_out.
module dpd_compressor (
  input  logic clk,
  input  logic enable,
  input  logic a_in, b_in, c_in, d_in,   // first digit, a_in = MSB
  input  logic e_in, f_in, g_in, h_in,   // second digit
  input  logic i_in, j_in, k_in, m_in,   // third digit
  output logic p_out, q_out, r_out,
  output logic s_out, t_out, u_out,
  output logic v_out,
  output logic w_out, x_out, y_out
);

  logic p, q, r, s, t, u, v, w, x, y;

  always_comb begin
    // p, q: bits b/c of the first digit, or j/k or f/g moved up when the
    // first digit is large.
    p = (b_in & ~a_in) | (j_in & a_in & ~i_in) | (f_in & a_in & ~e_in & i_in);
    q = (c_in & ~a_in) | (k_in & a_in & ~i_in) | (g_in & a_in & ~e_in & i_in);
    r = d_in;
    s = (f_in & ~e_in & ~i_in) | (f_in & ~a_in & ~e_in)
      | (j_in & ~a_in & e_in & ~i_in) | (e_in & i_in);
    t = (g_in & ~a_in & ~e_in) | (g_in & ~e_in & ~i_in)
      | (k_in & ~a_in & e_in & ~i_in) | (a_in & i_in);
    u = h_in;
    v = a_in | e_in | i_in;
    w = (j_in & ~a_in & ~e_in & ~i_in) | (e_in & i_in) | a_in;
    x = (k_in & ~a_in & ~e_in & ~i_in) | (a_in & i_in) | e_in;
    y = m_in;
  end

  always_ff @(posedge clk) begin
    if (enable) begin
      {p_out, q_out, r_out} <= {p, q, r};
      {s_out, t_out, u_out} <= {s, t, u};
      v_out                 <= v;
      {w_out, x_out, y_out} <= {w, x, y};
    end
  end

endmodule
