// baud_gen: baud rate generator of one UART channel.
// A down counter (the divisor latch counter) is loaded with divisor-1 on the
// start pulse and every time it reaches zero; each zero gives a one-cycle
// Baudx16 tick, so the tick rate is clk / divisor. A 4-bit baud clock counter
// counts those ticks; its MSB is the baud clock (a square wave at
// clk / (16 * divisor)) and its wrap gives a one-cycle baud tick.
// Example from the original design description: 100 MHz and 115200 baud need divisor 54 (36h).
// Divisor 0 stops the generator (this design's choice); the original design description allows
// divisors from 2 to 2^16-1. Outputs are clock enables in the clk domain,
// not separate clocks: that is this design's choice, made to keep a single
// clock domain.
module baud_gen #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div_reg_value,
  input  logic             start_i,       // divisor written: reload
  output logic             baudx16_clk,   // one-cycle tick, 16x baud rate
  output logic             baud_clk,      // square wave at the baud rate
  output logic             baud_tick      // one-cycle tick at the baud rate
);

  logic [DIV_W-1:0] div_cnt;
  logic [3:0]       baud_cnt;
  logic             running;

  assign running = (div_reg_value != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt     <= '0;
      baud_cnt    <= '0;
      baudx16_clk <= 1'b0;
      baud_tick   <= 1'b0;
    end else begin
      baudx16_clk <= 1'b0;
      baud_tick   <= 1'b0;
      if (start_i || !running) begin
        div_cnt  <= running ? div_reg_value - 1'b1 : '0;
        baud_cnt <= '0;
      end else if (div_cnt == '0) begin
        div_cnt     <= div_reg_value - 1'b1;
        baudx16_clk <= 1'b1;
        baud_cnt    <= baud_cnt + 1'b1;
        if (baud_cnt == 4'hF) baud_tick <= 1'b1;
      end else begin
        div_cnt <= div_cnt - 1'b1;
      end
    end
  end

  assign baud_clk = baud_cnt[3];

endmodule
