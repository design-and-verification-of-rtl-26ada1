// quad_uart_top: APB-compliant quad-channel UART.
// One APB slave interface serves four independent 16550-style UART channels.
// The APB interface turns a SETUP/ACCESS transfer into a one-cycle write or
// read strobe; the 1-4 demultiplexer steers that strobe to the channel named
// by Pselect(1:0) and returns that channel's read data on Prdata. Paddr(2:0)
// picks the register inside the channel. Each channel has its own divisor,
// so the four can run at different baud rates. The four channel interrupts
// are ORed onto Intr_Out; software reads the IIRs to find the source.
// For verification with the single host interface, each channel's
// transmitter can be looped back to its own receiver through a skew_loopback
// delay line: loopback[i] selects the looped path instead of rx_in[i], and
// skew_sel[i] sets the delay in Pclk cycles. Block structure and port names
// follow the original design's architecture; the loopback ports are this design's
// way of building the original design's skewed loopback into the design.
// Every transfer takes two Pclk cycles (SETUP, ACCESS), no wait states.
module quad_uart_top #(
  parameter int unsigned NUM_UART   = 4,
  parameter int unsigned FIFO_DEPTH = 128,
  parameter int unsigned SKEW_W     = 8,
  localparam int unsigned SEL_W     = $clog2(NUM_UART)
) (
  input  logic                           pclk,
  input  logic                           presetn,
  input  logic                           psel,
  input  logic [SEL_W-1:0]               pselect,
  input  logic                           penable,
  input  logic                           pwrite,
  input  logic                           pread,
  input  logic [2:0]                     paddr,
  input  logic [7:0]                     pwdata,
  output logic [7:0]                     prdata,
  output logic                           pready,
  output logic                           intr_out,
  output logic [NUM_UART-1:0]            tx_out,
  input  logic [NUM_UART-1:0]            rx_in,
  input  logic [NUM_UART-1:0]            loopback,
  input  logic [NUM_UART-1:0][SKEW_W-1:0] skew_sel
);

  import uart_pkg::*;

  logic                     we, rd;
  apb_state_e               apb_state;
  logic [NUM_UART-1:0]      we_ch, rd_ch, intr_ch, rx_ch, loop_ch;
  logic [NUM_UART-1:0][7:0] rdata_ch;

  apb_interface u_apb (
    .pclk(pclk), .presetn(presetn), .psel(psel), .penable(penable),
    .pwrite(pwrite), .pread(pread), .we_o(we), .rd_o(rd),
    .pready_o(pready), .state_o(apb_state)
  );

  apb_demux #(.NUM_UART(NUM_UART)) u_demux (
    .sel(pselect), .we_i(we), .rd_i(rd), .we_o(we_ch), .rd_o(rd_ch),
    .rdata_i(rdata_ch), .rdata_o(prdata)
  );

  for (genvar i = 0; i < NUM_UART; i++) begin : g_uart
    uart_core #(.FIFO_DEPTH(FIFO_DEPTH)) u_uart (
      .clk(pclk), .rst_n(presetn), .we(we_ch[i]), .rd(rd_ch[i]),
      .addr(paddr), .wdata(pwdata), .rdata(rdata_ch[i]),
      .intr(intr_ch[i]), .txd(tx_out[i]), .rxd(rx_ch[i])
    );

    skew_loopback #(.SKEW_W(SKEW_W)) u_skew (
      .clk(pclk), .rst_n(presetn), .skew_sel(skew_sel[i]),
      .din(tx_out[i]), .dout(loop_ch[i])
    );

    assign rx_ch[i] = loopback[i] ? loop_ch[i] : rx_in[i];
  end

  assign intr_out = |intr_ch;

endmodule
