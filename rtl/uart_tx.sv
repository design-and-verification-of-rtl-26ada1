// uart_tx: transmitter of one UART channel.
// A state machine sends one frame per character taken from the TX FIFO:
//   Idle         -> Load          when no break is set and data is available
//   Load         -> Shift         after the start bit (line low)
//   Shift        -> Parity        after the data bits, parity enabled
//   Shift        -> Stop_One      after the data bits, parity disabled
//   Parity       -> Stop_One      after the parity bit
//   Stop_One     -> Stop_Multiple after one stop bit, extra stop bits enabled
//   Stop_One     -> Idle          after one stop bit otherwise
//   Stop_Multiple-> Idle          after the extra half or whole stop bit
// These states and conditions are the original design's. Every bit lasts 16 ticks
// of the Baudx16 enable; the extra stop bit lasts 8 ticks for 5-bit
// characters (1.5 stop bits) and 16 otherwise (2 stop bits), as in the 16550.
// Data goes out LSB first. A frame starts only on a Baudx16 tick, so every
// bit is exactly 16 tick periods long. The byte is popped from the FIFO when
// the FSM leaves Idle; when the next byte is already waiting at the end of a
// stop bit, Idle is passed in the same cycle and the next start bit follows
// without a gap (back-to-back frames are exactly 16*(frame bits) ticks
// apart). With LCR break set the line is driven low and no new
// frame starts. busy is high from Load to the end of the last stop bit.
module uart_tx
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick16,
  input  lcr_t       lcr,
  input  logic       data_avail,
  input  logic [7:0] data_in,
  output logic       pop,
  output logic       txd,
  output logic       busy
);

  typedef enum logic [2:0] {
    TX_IDLE, TX_LOAD, TX_SHIFT, TX_PARITY, TX_STOP_ONE, TX_STOP_MULTIPLE
  } tx_state_e;

  tx_state_e  state;
  logic [3:0] tcnt;      // ticks within the current bit
  logic [2:0] bitcnt;    // data bits sent
  logic [7:0] shreg;
  logic       par;
  logic       line;
  logic       bit_end;
  logic       frame_end;   // last tick of the last stop bit

  assign bit_end = tick16 && (tcnt == 4'd15);
  assign frame_end = (state == TX_STOP_ONE && bit_end && !lcr.stb) ||
                     (state == TX_STOP_MULTIPLE && tick16 &&
                      tcnt == ((lcr.wls == 2'd0) ? 4'd7 : 4'd15));
  assign pop     = ((state == TX_IDLE && tick16) || frame_end) && !lcr.brk && data_avail;
  assign busy    = (state != TX_IDLE);
  assign txd     = lcr.brk ? 1'b0 : line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= TX_IDLE;
      tcnt   <= '0;
      bitcnt <= '0;
      shreg  <= '0;
      par    <= 1'b0;
      line   <= 1'b1;
    end else begin
      if (tick16) tcnt <= tcnt + 1'b1;
      unique case (state)
        TX_IDLE: line <= 1'b1;
        TX_LOAD: if (bit_end) begin
          line  <= shreg[0];
          shreg <= shreg >> 1;
          state <= TX_SHIFT;
        end
        TX_SHIFT: if (bit_end) begin
          if (bitcnt == 3'(data_bits(lcr) - 1)) begin
            line  <= lcr.pen ? par : 1'b1;
            state <= lcr.pen ? TX_PARITY : TX_STOP_ONE;
          end else begin
            bitcnt <= bitcnt + 1'b1;
            line   <= shreg[0];
            shreg  <= shreg >> 1;
          end
        end
        TX_PARITY: if (bit_end) begin
          line  <= 1'b1;
          state <= TX_STOP_ONE;
        end
        TX_STOP_ONE: if (bit_end && lcr.stb) state <= TX_STOP_MULTIPLE;
        TX_STOP_MULTIPLE: ;
        default: state <= TX_IDLE;
      endcase
      if (frame_end) state <= TX_IDLE;
      // Idle -> Load; taken straight from the end of a frame when the next
      // byte is waiting, so back-to-back frames have no gap.
      if (pop) begin
        shreg  <= mask_data(lcr, data_in);
        par    <= parity_bit(lcr, mask_data(lcr, data_in));
        tcnt   <= '0;
        bitcnt <= '0;
        line   <= 1'b0;          // start bit
        state  <= TX_LOAD;
      end
    end
  end

endmodule
