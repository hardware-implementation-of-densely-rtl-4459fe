// uart_rx: oversampling UART receiver (start bit, DBIT data bits LSB first,
// one stop bit, no parity).
//
// The line idles at 1. A falling edge moves the receiver from IDLE to START,
// where it counts 8 sampling ticks to reach the middle of the start bit.
// In DATA it then waits 16 ticks per bit, so that every data bit is sampled
// near its middle, and shifts the sample into b from the top. After DBIT
// bits it waits SB_TICK ticks in STOP and pulses rx_done_tick with the byte
// on dout. Registers s (tick count), n (bit count) and b (data) and the four
// states follow the source design's flow chart; the synchronous active-low
// reset is this design's own choice. The stop bit's value is not checked.
//
// rx must already be synchronous to clk (the top puts a two-flop
// synchronizer in front). s_tick is the 16x sampling tick from baud_gen.
// dout holds the last byte until the next one completes.
module uart_rx #(
  parameter int unsigned DBIT    = 8,
  parameter int unsigned SB_TICK = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rx,
  input  logic            s_tick,
  output logic            rx_done_tick,
  output logic [DBIT-1:0] dout
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  state_t                      state;
  logic [4:0]                  s;   // tick counter, up to 31
  logic [$clog2(DBIT+1)-1:0]   n;   // data bit counter
  logic [DBIT-1:0]             b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= IDLE;
      s            <= '0;
      n            <= '0;
      b            <= '0;
      rx_done_tick <= 1'b0;
    end else begin
      rx_done_tick <= 1'b0;
      unique case (state)
        IDLE:
          if (!rx) begin
            s     <= '0;
            state <= START;
          end
        START:
          if (s_tick) begin
            if (s == 5'd7) begin
              s     <= '0;
              n     <= '0;
              state <= DATA;
            end else begin
              s <= s + 1'b1;
            end
          end
        DATA:
          if (s_tick) begin
            if (s == 5'd15) begin
              s <= '0;
              b <= {rx, b[DBIT-1:1]};
              if (n == ($bits(n))'(DBIT - 1)) state <= STOP;
              else                            n     <= n + 1'b1;
            end else begin
              s <= s + 1'b1;
            end
          end
        STOP:
          if (s_tick) begin
            if (s == 5'(SB_TICK - 1)) begin
              rx_done_tick <= 1'b1;
              state        <= IDLE;
            end else begin
              s <= s + 1'b1;
            end
          end
        default: state <= IDLE;
      endcase
    end
  end

  assign dout = b;

  initial assert (SB_TICK >= 1 && SB_TICK <= 32)
    else $error("uart_rx: SB_TICK=%0d out of range", SB_TICK);

endmodule
