// apb_demux: the 1-4 demultiplexer between the APB interface and the four
// UART channels. The 2-bit channel select (Pselect) steers the write and
// read strobes to one channel, one-hot, and picks that channel's read data
// for Prdata. Address and write data are shared by all channels, so only the
// strobes need steering. Purely combinational, no latency.
module apb_demux #(
  parameter int unsigned NUM_UART = 4,
  localparam int unsigned SEL_W   = $clog2(NUM_UART)
) (
  input  logic [SEL_W-1:0]         sel,
  input  logic                     we_i,
  input  logic                     rd_i,
  output logic [NUM_UART-1:0]      we_o,
  output logic [NUM_UART-1:0]      rd_o,
  input  logic [NUM_UART-1:0][7:0] rdata_i,
  output logic [7:0]               rdata_o
);

  always_comb begin
    we_o = '0;
    rd_o = '0;
    we_o[sel] = we_i;
    rd_o[sel] = rd_i;
  end

  assign rdata_o = rdata_i[sel];

endmodule
