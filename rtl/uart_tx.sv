// uart_tx: UART transmitter (start bit, DBIT data bits LSB first, one stop
// bit, no parity), driven by the same 16x sampling tick as the receiver.
//
// A tx_start pulse while tx_ready is high loads din into a shift register.
// The line is then driven low for 16 ticks (start bit), with each data bit
// for 16 ticks, LSB first, and high for SB_TICK ticks (stop bit); tx_done_tick
// pulses for one cycle at the end. The shift-register structure, the shared
// tick and 16 ticks per bit follow the source design; the ready output, the
// registered line driver and the synchronous active-low reset are this
// design's own choices. A tx_start while busy is ignored.
module uart_tx #(
  parameter int unsigned DBIT    = 8,
  parameter int unsigned SB_TICK = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tx_start,
  input  logic            s_tick,
  input  logic [DBIT-1:0] din,
  output logic            tx_ready,
  output logic            tx_done_tick,
  output logic            tx
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  state_t                    state;
  logic [4:0]                s;
  logic [$clog2(DBIT+1)-1:0] n;
  logic [DBIT-1:0]           b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= IDLE;
      s            <= '0;
      n            <= '0;
      b            <= '0;
      tx           <= 1'b1;
      tx_done_tick <= 1'b0;
    end else begin
      tx_done_tick <= 1'b0;
      unique case (state)
        IDLE: begin
          tx <= 1'b1;
          if (tx_start) begin
            s     <= '0;
            b     <= din;
            tx    <= 1'b0;
            state <= START;
          end
        end
        START:
          if (s_tick) begin
            if (s == 5'd15) begin
              s     <= '0;
              n     <= '0;
              tx    <= b[0];
              state <= DATA;
            end else begin
              s <= s + 1'b1;
            end
          end
        DATA:
          if (s_tick) begin
            if (s == 5'd15) begin
              s <= '0;
              b <= b >> 1;
              if (n == ($bits(n))'(DBIT - 1)) begin
                tx    <= 1'b1;
                state <= STOP;
              end else begin
                n  <= n + 1'b1;
                tx <= b[1];
              end
            end else begin
              s <= s + 1'b1;
            end
          end
        STOP:
          if (s_tick) begin
            if (s == 5'(SB_TICK - 1)) begin
              tx_done_tick <= 1'b1;
              state        <= IDLE;
            end else begin
              s <= s + 1'b1;
            end
          end
        default: state <= IDLE;
      endcase
    end
  end

  assign tx_ready = (state == IDLE);

endmodule
