// uart_pkg: types and constants shared by the quad-channel 16550-style UART.
// It holds the register addresses of one channel, the line control register
// layout, the interrupt identification codes and the bus states of the APB
// slave. The register layout is the classic 16550 one; the bus states are
// the three APB phases (IDLE, SETUP, ACCESS).
package uart_pkg;

  // Register offsets on the 3-bit address bus of one channel.
  localparam logic [2:0] ADDR_RBR_THR = 3'd0;  // DLL when LCR.dlab
  localparam logic [2:0] ADDR_IER     = 3'd1;  // DLM when LCR.dlab
  localparam logic [2:0] ADDR_IIR_FCR = 3'd2;
  localparam logic [2:0] ADDR_LCR     = 3'd3;
  localparam logic [2:0] ADDR_LSR     = 3'd5;

  // Line control register.
  typedef struct packed {
    logic       dlab;     // 7: divisor latch access
    logic       brk;      // 6: break control, TX held low
    logic       stick;    // 5: stick parity
    logic       eps;      // 4: even parity select
    logic       pen;      // 3: parity enable
    logic       stb;      // 2: 0 = 1 stop bit, 1 = 1.5 (5 bits) or 2 stop bits
    logic [1:0] wls;      // 1:0: data bits - 5
  } lcr_t;

  // Interrupt identification codes (IIR[3:0]), highest priority first.
  typedef enum logic [3:0] {
    IID_RLS  = 4'b0110,   // receiver line status
    IID_RDA  = 4'b0100,   // received data available (trigger level)
    IID_CTO  = 4'b1100,   // character time-out
    IID_THRE = 4'b0010,   // transmitter holding register empty
    IID_NONE = 4'b0001
  } iid_e;

  // APB slave bus states.
  typedef enum logic [1:0] {
    S_IDLE   = 2'd0,
    S_SETUP  = 2'd1,
    S_ACCESS = 2'd2
  } apb_state_e;

  // Number of data bits (5..8) from the word-length field.
  function automatic logic [3:0] data_bits(input lcr_t l);
    return 4'd5 + {2'b00, l.wls};
  endfunction

  // Parity bit to send or expect for the data word d (already masked to
  // the configured width).
  function automatic logic parity_bit(input lcr_t l, input logic [7:0] d);
    if (l.stick) return ~l.eps;          // stick: even-select gives 0, odd-select gives 1
    return l.eps ? (^d) : ~(^d);         // even: total count of ones even
  endfunction

  // Mask a character to the configured word length.
  function automatic logic [7:0] mask_data(input lcr_t l, input logic [7:0] d);
    return d & (8'hFF >> (3 - l.wls));
  endfunction

endpackage
