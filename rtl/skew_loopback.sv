// skew_loopback: skewed loopback path from a UART transmitter to a receiver.
// The serial line is pushed through a shift register of 2^SKEW_W-1 stages;
// skew_sel chooses the tap, so the receiver sees the transmitter's output
// delayed by skew_sel clock cycles (0 = no delay). Choosing skew_sel at
// random puts the receiver's sampling points at an arbitrary phase of the
// transmitted bits, which is how the quad UART is checked for truly
// asynchronous reception with a single host interface. The idea of a random
// skew on the loopback is the original design's; the shift-register form and the
// 255-cycle maximum are this design's choices. The register resets to the
// idle (high) line level.
module skew_loopback #(
  parameter int unsigned SKEW_W = 8,
  localparam int unsigned STAGES = (1 << SKEW_W) - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [SKEW_W-1:0] skew_sel,
  input  logic              din,
  output logic              dout
);

  logic [STAGES:0] taps;

  assign taps[0] = din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) taps[STAGES:1] <= '1;
    else        taps[STAGES:1] <= taps[STAGES-1:0];
  end

  assign dout = taps[skew_sel];

endmodule
