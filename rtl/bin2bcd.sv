// bin2bcd: unsigned binary number to BCD digits by shift-and-add-3.
//
// The binary number is shifted left one bit at a time into a row of BCD
// columns (units, tens, hundreds, ...). Before each shift, every column
// holding 5 or more gets 3 added, so that the shift carries a decimal 10
// into the next column instead of a binary 16. After WIDTH shifts the
// columns hold the decimal digits. The loop unrolls into a triangular array
// of add-3-if-at-least-5 cells, one row per input bit, the same structure as
// the array of cells in the source design; no cell is needed for a column
// that cannot yet hold 5.
//
// The source design converts 8-bit numbers to 12 bits (three digits), which
// is the default here. Purely combinational: bcd_out follows bin_in.
// bcd_out = {hundreds, tens, units} for the default size.
module bin2bcd #(
  parameter int unsigned WIDTH  = 8,
  // Digits needed for 2**WIDTH-1: floor(WIDTH*log10(2)) + 1.
  parameter int unsigned DIGITS = (WIDTH * 30103) / 100000 + 1
) (
  input  logic [WIDTH-1:0]    bin_in,
  output logic [4*DIGITS-1:0] bcd_out
);

  logic [4*DIGITS-1:0] cols;

  always_comb begin
    cols = '0;
    for (int unsigned step = 0; step < WIDTH; step++) begin
      for (int unsigned dg = 0; dg < DIGITS; dg++) begin
        if (cols[4*dg +: 4] >= 4'd5)
          cols[4*dg +: 4] = cols[4*dg +: 4] + 4'd3;
      end
      cols = {cols[4*DIGITS-2:0], bin_in[WIDTH-1-step]};
    end
    bcd_out = cols;
  end

endmodule
