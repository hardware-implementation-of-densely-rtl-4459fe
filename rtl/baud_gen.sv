// baud_gen: mod-M counter used as the baud rate generator.
//
// The counter runs 0, 1, ..., M-1 and wraps to 0; tick is high for the one
// clock cycle in which the count is M-1. With M = 163 and a 50 MHz clock the
// tick comes every 3.26 us, i.e. 16 times per bit at 19200 baud (0.15 %
// slow). N is the counter width. The counter, its two parameters and its
// use as the sampling-tick source of both UART halves follow the source
// design; the value of M is this design's arithmetic, the synchronous
// active-low reset its own choice.
//
// Interface: q is the current count, tick the one-cycle enable pulse.
module baud_gen #(
  parameter int unsigned M = 163,
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         tick,
  output logic [N-1:0] q
);

  localparam logic [N-1:0] LAST = N'(M - 1);

  always_ff @(posedge clk) begin
    if (!rst_n)         q <= '0;
    else if (q == LAST) q <= '0;
    else                q <= q + 1'b1;
  end

  assign tick = (q == LAST);

  initial assert (M >= 2 && (M - 1) < (2 ** N))
    else $error("baud_gen: M=%0d does not fit N=%0d bits", M, N);

endmodule
