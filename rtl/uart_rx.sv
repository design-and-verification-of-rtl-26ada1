// uart_rx: receiver of one UART channel.
// The serial input is synchronised with two flip-flops. Two state machines
// do the work, as in the original design description:
//  * the main FSM, always active:
//      Idle -> Hunt   on a falling edge of the line,
//      Hunt -> Idle   if the line is high again at the middle of the start
//                     bit (invalid start bit),
//      Hunt -> Wait   if it is still low there (valid start bit),
//      Wait -> Save   at the middle of the stop bit, where it is checked,
//      Save -> Idle   after the character and its flags are handed out,
//      Save -> Wait   (self recovery after a frame error): when the stop
//                     sample was low, the data was not all zero and the line
//                     is still low, that sample is taken as the middle of the
//                     next start bit.
//  * the shift FSM, enabled by the main FSM in Wait, shifts in the data bits
//    (LSB first) and then the parity bit at the middle of each bit.
// Timing comes from the Baudx16 tick: a sample counter, run only while the
// main FSM is in Hunt or Wait, marks the middle of each bit (8 ticks after the
// falling edge, then every 16 ticks). In Save a one-cycle push carries the
// data (right-aligned, upper bits zero), the parity error and the frame
// error.
// A break counter, loaded with 16*(start+data+parity+1 stop)-1 ticks (9Fh
// for 8 data bits without parity) while the line is high, counts ticks while
// it is low; reaching zero pulses brk once. The frame error of the all-zero
// character therefore comes first and the break after it, as the original design description
// describes.
module uart_rx
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick16,
  input  lcr_t       lcr,
  input  logic       rxd,
  output logic       push,
  output logic [7:0] data,
  output logic       pe,
  output logic       fe,
  output logic       brk
);

  typedef enum logic [1:0] {RX_IDLE, RX_HUNT, RX_WAIT, RX_SAVE} rx_main_e;
  typedef enum logic [1:0] {SH_IDLE, SH_DATA, SH_PARITY, SH_DONE} rx_shift_e;

  rx_main_e   mstate;
  rx_shift_e  sstate;
  logic [1:0] sync;
  logic       rxs, rxs_d;
  logic [3:0] scnt;          // sample counter, Baudx16 ticks
  logic [2:0] bitcnt;
  logic [7:0] shreg;
  logic       par_rx;
  logic       stop_ok;
  logic       sample;
  logic [7:0] brk_cnt;
  logic       brk_seen;
  logic [7:0] rx_data;
  logic       pe_calc;

  assign rxs    = sync[1];
  assign sample = tick16 && (scnt == 4'd15) && (mstate == RX_WAIT);

  // Data right-aligned to the configured word length.
  assign rx_data = shreg >> (3 - lcr.wls);
  assign pe_calc = lcr.pen && (par_rx != parity_bit(lcr, rx_data));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= 2'b11;
      rxs_d <= 1'b1;
    end else begin
      sync  <= {sync[0], rxd};
      rxs_d <= rxs;
    end
  end

  // Main FSM and sample counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mstate  <= RX_IDLE;
      scnt    <= '0;
      stop_ok <= 1'b1;
      push    <= 1'b0;
      data    <= '0;
      pe      <= 1'b0;
      fe      <= 1'b0;
    end else begin
      push <= 1'b0;
      unique case (mstate)
        RX_IDLE: begin
          scnt <= '0;
          if (rxs_d && !rxs) mstate <= RX_HUNT;
        end
        RX_HUNT: if (tick16) begin
          scnt <= scnt + 1'b1;
          if (scnt == 4'd7) begin
            scnt   <= '0;
            mstate <= rxs ? RX_IDLE : RX_WAIT;
          end
        end
        RX_WAIT: begin
          if (tick16) scnt <= scnt + 1'b1;
          if (sample && sstate == SH_DONE) begin
            stop_ok <= rxs;
            mstate  <= RX_SAVE;
          end
        end
        RX_SAVE: begin
          push <= 1'b1;
          data <= rx_data;
          pe   <= pe_calc;
          fe   <= !stop_ok;
          scnt <= '0;
          if (!stop_ok && rx_data != '0 && !rxs) mstate <= RX_WAIT;
          else                                   mstate <= RX_IDLE;
        end
        default: mstate <= RX_IDLE;
      endcase
    end
  end

  // Shift FSM.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sstate <= SH_IDLE;
      bitcnt <= '0;
      shreg  <= '0;
      par_rx <= 1'b0;
    end else if (mstate != RX_WAIT) begin
      sstate <= SH_IDLE;
    end else begin
      unique case (sstate)
        SH_IDLE: begin
          bitcnt <= '0;
          shreg  <= '0;
          sstate <= SH_DATA;
        end
        SH_DATA: if (sample) begin
          shreg  <= {rxs, shreg[7:1]};
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == 3'(data_bits(lcr) - 1))
            sstate <= lcr.pen ? SH_PARITY : SH_DONE;
        end
        SH_PARITY: if (sample) begin
          par_rx <= rxs;
          sstate <= SH_DONE;
        end
        SH_DONE: ;
        default: sstate <= SH_IDLE;
      endcase
    end
  end

  // Break counter.
  logic [7:0] brk_load;
  assign brk_load = 8'((16 * (32'(data_bits(lcr)) + 32'(lcr.pen) + 2)) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      brk_cnt  <= 8'h9F;
      brk_seen <= 1'b0;
      brk      <= 1'b0;
    end else begin
      brk <= 1'b0;
      if (rxs) begin
        brk_cnt  <= brk_load;
        brk_seen <= 1'b0;
      end else if (tick16 && !brk_seen) begin
        if (brk_cnt == '0) begin
          brk      <= 1'b1;
          brk_seen <= 1'b1;
        end else begin
          brk_cnt <= brk_cnt - 1'b1;
        end
      end
    end
  end

endmodule
