// sync_fifo: single-clock FIFO used as the transmit and the receive FIFO of a
// UART channel. Writes go to the location of the top pointer, reads come from
// the bottom pointer; a fill counter increments on a push without pop,
// decrements on a pop without push and holds otherwise. Empty is count 0,
// full is count DEPTH. A push into a full FIFO is dropped and pulses
// overrun; a pop from an empty FIFO is ignored and pulses underrun (both
// registered, one cycle after the request). dout shows the head entry
// combinationally (first-word fall-through), so a pop consumes the shown
// value. clr empties the FIFO (FCR FIFO reset). The 128-entry default is the
// document's FIFO size.
module sync_fifo #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             push,
  input  logic             pop,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic [AW:0]      count,
  output logic             empty,
  output logic             full,
  output logic             overrun,
  output logic             underrun
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    top_ptr, bot_ptr;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[bot_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[top_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top_ptr  <= '0;
      bot_ptr  <= '0;
      count    <= '0;
      overrun  <= 1'b0;
      underrun <= 1'b0;
    end else if (clr) begin
      top_ptr  <= '0;
      bot_ptr  <= '0;
      count    <= '0;
      overrun  <= 1'b0;
      underrun <= 1'b0;
    end else begin
      overrun  <= push && full;
      underrun <= pop && empty;
      if (do_push) top_ptr <= inc(top_ptr);
      if (do_pop)  bot_ptr <= inc(bot_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

endmodule
