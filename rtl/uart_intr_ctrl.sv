// uart_intr_ctrl: interrupt controller of one UART channel.
// Four interrupt sources, each gated by its enable bit in IER, are ranked
// and the highest pending one is reported in IIR[3:0]:
//   1. receiver line status (overrun, parity, framing error or break) 0110
//   2. received data available (RX FIFO at its trigger level)         0100
//   3. character time-out                                             1100
//   4. transmitter holding register empty                             0010
// No pending interrupt reads 0001 and leaves the interrupt line low. The
// sources are the original design's; ranking and codes follow the 16550, on which
// the original design description bases the channel. Purely combinational.
module uart_intr_ctrl
  import uart_pkg::*;
(
  input  logic [3:0] ier,
  input  logic       rls,
  input  logic       rda,
  input  logic       cto,
  input  logic       thre,
  output logic       intr,
  output iid_e       iir_id
);

  always_comb begin
    if (ier[2] && rls)       iir_id = IID_RLS;
    else if (ier[0] && rda)  iir_id = IID_RDA;
    else if (ier[0] && cto)  iir_id = IID_CTO;
    else if (ier[1] && thre) iir_id = IID_THRE;
    else                     iir_id = IID_NONE;
  end

  assign intr = (iir_id != IID_NONE);

endmodule
