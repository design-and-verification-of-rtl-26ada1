// apb_bfm: APB master bus-functional model used by the quad UART
// testbenches. It holds the APB signals of the quad UART and offers write
// and read tasks. A transfer is one SETUP cycle and one ACCESS cycle; read
// data is taken at the rising edge that ends ACCESS, when PREADY must be
// high. A call with keep set is followed back-to-back by the next call (ACCESS
// straight to SETUP); otherwise the bus returns to IDLE. It counts transfers,
// back-to-back transfers and PREADY violations.
interface apb_bfm (input logic pclk);
  logic       psel = 1'b0;
  logic [1:0] pselect = '0;
  logic       penable = 1'b0;
  logic       pwrite = 1'b0;
  logic       pread = 1'b0;
  logic [2:0] paddr = '0;
  logic [7:0] pwdata = '0;
  logic [7:0] prdata;
  logic       pready;

  int n_xfer = 0, n_b2b = 0, n_ready_err = 0;

  // keep = 1 leaves the bus in ACCESS so that the next call, made without a
  // wait, follows back-to-back; keep = 0 returns the bus to IDLE.
  task automatic xfer(input logic [1:0] ch, input logic [2:0] a, input logic w,
                      input logic [7:0] wd, input bit keep, output logic [7:0] rd);
    @(negedge pclk);
    if (psel && penable) n_b2b++;
    psel = 1'b1; penable = 1'b0; pselect = ch; paddr = a;
    pwrite = w; pread = !w; pwdata = wd;
    @(negedge pclk);
    penable = 1'b1;
    @(posedge pclk);
    rd = prdata;
    if (!pready) n_ready_err++;
    n_xfer++;
    if (!keep) begin
      @(negedge pclk);
      psel = 1'b0; penable = 1'b0; pwrite = 1'b0; pread = 1'b0;
    end
  endtask

  task automatic write(input logic [1:0] ch, input logic [2:0] a, input logic [7:0] d,
                       input bit keep = 1'b0);
    logic [7:0] unused;
    xfer(ch, a, 1'b1, d, keep, unused);
  endtask

  task automatic read(input logic [1:0] ch, input logic [2:0] a, output logic [7:0] d,
                      input bit keep = 1'b0);
    xfer(ch, a, 1'b0, 8'h00, keep, d);
  endtask
endinterface
