// dpd_pkg: types and constants shared by the DPD compression system.
//
// A decimal digit travels as a 4-bit BCD nibble, three digits as a 12-bit
// group (first digit in the top nibble) and a compressed group as a 10-bit
// densely packed decimal (DPD) word laid out p q r s t u v w x y, p in bit 9.
// The serial-line constants are the system's operating point: a 50 MHz clock,
// 19200 baud, 16 samples per bit, 8 data bits and one stop bit, no parity.
// The mod-M divisor is this design's own arithmetic on those numbers,
// rounded to the nearest integer.
package dpd_pkg;

  typedef logic [3:0]  bcd_digit_t;
  typedef logic [11:0] bcd3_t;
  typedef logic [9:0]  dpd_t;

  localparam int unsigned CLK_HZ_DEF     = 50_000_000;
  localparam int unsigned BAUD_DEF       = 19_200;
  localparam int unsigned OVERSAMPLE_DEF = 16;
  localparam int unsigned DBIT_DEF       = 8;   // data bits per frame
  localparam int unsigned SB_TICK_DEF    = 16;  // ticks in one stop bit

  // Mod-M divisor for the sampling tick: round(clk / (baud * oversample)).
  function automatic int unsigned baud_divisor(int unsigned clk_hz,
                                               int unsigned baud,
                                               int unsigned oversample);
    int unsigned rate;
    rate = baud * oversample;
    return (clk_hz + rate / 2) / rate;
  endfunction

endpackage
