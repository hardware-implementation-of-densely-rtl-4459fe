// output_appender: turns the stream of 10-bit DPD words into the 8-bit data
// frames the UART carries.
//
// The words are appended, MSB first, to a bit queue of BUF_W bits; whenever
// the queue holds at least 8 bits its first 8 bits are offered as a byte
// (byte_valid/byte_out) and leave it when byte_ready is high. Four DPD
// words thus leave as five bytes with no unused bits. At the end of a
// message (flush) the queue is filled with zero bits up to the next byte
// boundary so that the last bits are sent too, the same way the input side
// pads a short BCD group. Fitting the 10-bit words to 8-bit frames follows
// the source design; packing them as one continuous bit stream, the byte
// handshake and the zero padding at a message end are this design's own
// choices.
//
// A word is accepted only while in_ready is high (at most BUF_W-10 bits
// queued). The UART input cannot be stalled, so a word that arrives while
// in_ready is low is dropped and reported by a one-cycle drop pulse; with
// 16-tick UART frames on both sides the output carries more than the input
// needs except for a long run of one-digit messages, and the queue of 24
// bits then takes two such messages of backlog.
//
// Timing: a word or a flush is in the queue one cycle later; a byte pops in
// the cycle byte_valid and byte_ready are both high. Synchronous active-low
// reset empties the queue.
module output_appender
  import dpd_pkg::*;
#(
  parameter int unsigned BUF_W = 24
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  dpd_t       in_word,
  input  logic       flush,
  output logic       in_ready,
  output logic       drop,
  output logic       byte_valid,
  output logic [7:0] byte_out,
  input  logic       byte_ready
);

  localparam int unsigned CW = $clog2(BUF_W + 1);

  logic [BUF_W-1:0] queue;     // left aligned: the oldest bit is queue[BUF_W-1]
  logic [CW-1:0]    cnt;       // bits queued
  logic [BUF_W-1:0] queue_nx;
  logic [CW-1:0]    cnt_nx;

  assign in_ready   = (cnt <= CW'(BUF_W - 10));
  assign byte_valid = (cnt >= CW'(8));
  assign byte_out   = queue[BUF_W-1 -: 8];

  always_comb begin
    queue_nx = queue;
    cnt_nx   = cnt;
    if (byte_valid && byte_ready) begin
      queue_nx = queue_nx << 8;
      cnt_nx   = cnt_nx - CW'(8);
    end
    if (in_valid && in_ready) begin
      queue_nx = queue_nx | (BUF_W'(in_word) << (CW'(BUF_W - 10) - cnt_nx));
      cnt_nx   = cnt_nx + CW'(10);
    end
    if (flush)
      cnt_nx = (cnt_nx + CW'(7)) & ~CW'(7);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      queue <= '0;
      cnt   <= '0;
      drop  <= 1'b0;
    end else begin
      queue <= queue_nx;
      cnt   <= cnt_nx;
      drop  <= in_valid && !in_ready;
    end
  end

  initial assert (BUF_W >= 24 && BUF_W % 8 == 0)
    else $error("output_appender: BUF_W=%0d must be a multiple of 8, at least 24", BUF_W);

endmodule
