// apb_interface: AMBA APB slave front end of the quad UART.
// It follows the bus through the three APB states. IDLE: no select.
// SETUP: PSEL_X_I high, PENABLE low, for exactly one cycle. ACCESS: PSEL_X_I
// and PENABLE high. The state register holds the phase of the previous
// cycle, so an ACCESS cycle is accepted only right after a SETUP cycle. In that
// cycle the interface raises WE_O (Pwrite high) or RD_O (Pwrite low and Pread
// high) for one Pclk, combinationally. The register write or read side
// effect happens at the rising edge that ends the ACCESS cycle.
// The slave never inserts wait states: PREADY is high in every ACCESS cycle,
// so each transfer takes two cycles, back-to-back transfers go from ACCESS
// straight to SETUP. The state names and the select/enable values per state
// follow the original design description; the zero-wait-state choice and the use of Pread as a
// read qualifier are this design's own.
// Lint reports presetn as used both asynchronously and synchronously: the
// synchronous use is only the disable condition of the protocol assertions
// below, not logic.
module apb_interface
  import uart_pkg::*;
(
  input  logic       pclk,
  input  logic       presetn,
  input  logic       psel,       // PSEL_X_I
  input  logic       penable,
  input  logic       pwrite,
  input  logic       pread,
  output logic       we_o,
  output logic       rd_o,
  output logic       pready_o,
  output apb_state_e state_o
);

  apb_state_e state_q, state_d;

  // Phase of the current cycle as seen on the bus.
  always_comb begin
    if (!psel)        state_d = S_IDLE;
    else if (!penable) state_d = S_SETUP;
    else               state_d = S_ACCESS;
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) state_q <= S_IDLE;
    else          state_q <= state_d;
  end

  logic access_ok;
  assign access_ok = (state_d == S_ACCESS) && (state_q == S_SETUP);

  assign we_o     = access_ok &&  pwrite;
  assign rd_o     = access_ok && !pwrite && pread;
  assign pready_o = (state_d == S_ACCESS);
  assign state_o  = state_q;

  // An ACCESS cycle must follow a SETUP cycle (or, with wait states, another
  // ACCESS cycle; this slave has none).
  property p_access_after_setup;
    @(posedge pclk) disable iff (!presetn)
      (state_d == S_ACCESS) |-> (state_q == S_SETUP);
  endproperty
  a_access_after_setup: assert property (p_access_after_setup)
    else $error("APB: ACCESS without preceding SETUP");

  // SETUP lasts one cycle: the next cycle is ACCESS.
  property p_setup_one_cycle;
    @(posedge pclk) disable iff (!presetn)
      (state_d == S_SETUP) |=> (state_d == S_ACCESS);
  endproperty
  a_setup_one_cycle: assert property (p_setup_one_cycle)
    else $error("APB: SETUP not followed by ACCESS");

endmodule
