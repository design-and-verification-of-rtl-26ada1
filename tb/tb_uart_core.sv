// tb_uart_core: checks one UART channel through its register interface.
// The channel's transmitter is looped back to its receiver in the
// testbench, or the testbench drives the receive line itself to inject
// errors. FIFOs are 16 deep to reach overrun quickly; divisor 2 gives
// 32 clocks per bit. Checked: reset values, divisor latch access, THR empty
// interrupt and its clearing by IIR read and THR write, data round trip and
// frame time (10 bits x 16 x divisor per character), received data
// available at trigger levels 1 and 4, character time-out after 4 character
// times and its clearing by an RBR read, parity error, break (framing error
// first, then break) as line status interrupts cleared by an LSR read,
// overrun, and FIFO clear through FCR.
module tb_uart_core;
  import uart_pkg::*;
  localparam int DIV = 2;
  localparam int BIT = 16 * DIV;
  logic clk = 0, rst_n = 0;
  logic we = 0, rd = 0;
  logic [2:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic intr, txd, rxd;
  logic loop = 1, drv = 1;
  int checks = 0, failures = 0;
  longint cyc = 0;

  assign rxd = loop ? txd : drv;

  uart_core #(.FIFO_DEPTH(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s t=%0t", msg, $time); end
  endtask

  task automatic wr(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk); we = 1; addr = a; wdata = d;
    @(negedge clk); we = 0;
  endtask

  task automatic rdreg(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk); rd = 1; addr = a; #1 d = rdata;
    @(negedge clk); rd = 0;
  endtask

  task automatic expect_reg(input logic [2:0] a, input logic [7:0] e, input string what);
    logic [7:0] d;
    rdreg(a, d);
    check(d === e, $sformatf("%s: reg %0d = %h exp %h", what, a, d, e));
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  // serial frame from the testbench, 8 data bits, parity bit p, stop level s
  task automatic drive_frame(input logic [7:0] d, input bit use_p, input logic p, input logic s);
    drv = 0; wait_cycles(BIT);
    for (int i = 0; i < 8; i++) begin drv = d[i]; wait_cycles(BIT); end
    if (use_p) begin drv = p; wait_cycles(BIT); end
    drv = s; wait_cycles(BIT);
    drv = 1; wait_cycles(BIT);
  endtask

  initial begin
    logic [7:0] v;
    longint t0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // reset values
    expect_reg(ADDR_LSR, 8'h60, "reset LSR");
    expect_reg(ADDR_IIR_FCR, 8'hC1, "reset IIR");
    expect_reg(ADDR_LCR, 8'h03, "reset LCR");
    check(!intr, "no interrupt after reset");
    // divisor
    wr(ADDR_LCR, 8'h83);
    wr(ADDR_RBR_THR, 8'(DIV));
    wr(ADDR_IER, 8'h00);
    expect_reg(ADDR_RBR_THR, 8'(DIV), "DLL");
    expect_reg(ADDR_IER, 8'h00, "DLM");
    wr(ADDR_LCR, 8'h03);
    // THRE interrupt
    wr(ADDR_IER, 8'h07);
    expect_reg(ADDR_IER, 8'h07, "IER");
    check(intr, "THRE interrupt pending");
    expect_reg(ADDR_IIR_FCR, 8'hC2, "IIR THRE");
    expect_reg(ADDR_IIR_FCR, 8'hC1, "IIR read clears THRE");
    // round trip of three characters; trigger level 1
    t0 = cyc;
    wr(ADDR_RBR_THR, 8'hA5);
    wr(ADDR_RBR_THR, 8'h3C);
    wr(ADDR_RBR_THR, 8'h0A);
    rdreg(ADDR_LSR, v);
    check(v[5] == 0 && v[6] == 0, "THRE/TEMT low while sending");
    while (!(dut.rx_count == 3)) @(posedge clk);
    // 3 frames of 10 bits plus tick alignment and receiver latency
    check(cyc - t0 >= 3 * 10 * BIT - BIT && cyc - t0 <= 3 * 10 * BIT + 2 * BIT,
          $sformatf("3 characters in %0d cycles, exp ~%0d", cyc - t0, 3 * 10 * BIT));
    wait_cycles(BIT);
    expect_reg(ADDR_IIR_FCR, 8'hC4, "IIR RDA at trigger 1");
    expect_reg(ADDR_RBR_THR, 8'hA5, "RBR 0");
    expect_reg(ADDR_RBR_THR, 8'h3C, "RBR 1");
    expect_reg(ADDR_RBR_THR, 8'h0A, "RBR 2");
    expect_reg(ADDR_LSR, 8'h60, "LSR after round trip");
    expect_reg(ADDR_IIR_FCR, 8'hC2, "THRE again after TX FIFO emptied");
    wr(ADDR_RBR_THR, 8'h11);                      // THR write clears THRE
    expect_reg(ADDR_IIR_FCR, 8'hC1, "THR write clears THRE");
    wait_cycles(12 * BIT);
    expect_reg(ADDR_IIR_FCR, 8'hC4, "RDA");
    expect_reg(ADDR_RBR_THR, 8'h11, "RBR 3");
    expect_reg(ADDR_IIR_FCR, 8'hC2, "THRE");      // clears THRE
    // trigger level 4 and character time-out
    wr(ADDR_IIR_FCR, 8'h40);
    wr(ADDR_RBR_THR, 8'h21);
    wr(ADDR_RBR_THR, 8'h22);
    wr(ADDR_RBR_THR, 8'h23);
    while (!(dut.rx_count == 3)) @(posedge clk);
    t0 = cyc;
    expect_reg(ADDR_IIR_FCR, 8'hC2, "below trigger: only THRE");
    while (!dut.cto && cyc - t0 < 100 * BIT) @(posedge clk);
    // 4 character times of 16*(1+8+1) ticks
    check(cyc - t0 >= 4 * 10 * BIT - DIV && cyc - t0 <= 4 * 10 * BIT + 2 * DIV,
          $sformatf("time-out after %0d cycles exp %0d", cyc - t0, 4 * 10 * BIT));
    expect_reg(ADDR_IIR_FCR, 8'hCC, "IIR CTO");
    expect_reg(ADDR_RBR_THR, 8'h21, "RBR clears CTO");
    expect_reg(ADDR_IIR_FCR, 8'hC1, "CTO cleared");
    wr(ADDR_RBR_THR, 8'h24);
    wr(ADDR_RBR_THR, 8'h25);
    wr(ADDR_RBR_THR, 8'h26);
    wait_cycles(40 * BIT);
    expect_reg(ADDR_IIR_FCR, 8'hC4, "RDA at trigger 4");
    wr(ADDR_IIR_FCR, 8'h02);                      // clear RX FIFO, trigger 1
    expect_reg(ADDR_LSR, 8'h60, "RX FIFO cleared");
    expect_reg(ADDR_IIR_FCR, 8'hC2, "THRE");
    // parity error, injected by the testbench
    wr(ADDR_LCR, 8'h1B);                          // 8 bits, even parity
    loop = 0;
    drive_frame(8'h81, 1, 1'b1, 1'b1);            // even parity of 81h is 0
    wait_cycles(BIT);
    expect_reg(ADDR_IIR_FCR, 8'hC6, "IIR line status (parity)");
    expect_reg(ADDR_LSR, 8'hE5, "LSR PE, DR, THRE, TEMT, error in FIFO");
    expect_reg(ADDR_LSR, 8'hE1, "LSR read clears PE");
    expect_reg(ADDR_RBR_THR, 8'h81, "RBR with parity error");
    expect_reg(ADDR_LSR, 8'h60, "error leaves FIFO");
    // break from our own transmitter
    wr(ADDR_LCR, 8'h03);
    loop = 1;
    wr(ADDR_LCR, 8'h43);
    wait_cycles(9 * BIT + BIT / 2 + 8 * DIV);
    rdreg(ADDR_LSR, v);
    check(v[3] == 1 && v[4] == 0, $sformatf("framing error before break, LSR %h", v));
    wait_cycles(BIT);
    rdreg(ADDR_LSR, v);
    check(v[4] == 1, $sformatf("break after one character time, LSR %h", v));
    wr(ADDR_LCR, 8'h03);
    wait_cycles(2 * BIT);
    expect_reg(ADDR_LSR, 8'hE1, "LSR read cleared BI/FE, bad character still queued");
    expect_reg(ADDR_RBR_THR, 8'h00, "break character");
    // overrun: 17 characters into a 16-deep RX FIFO
    for (int i = 0; i < 17; i++) wr(ADDR_RBR_THR, 8'(i));
    wait_cycles(18 * 10 * BIT);
    rdreg(ADDR_LSR, v);
    check(v[1] == 1 && v[0] == 1, $sformatf("overrun, LSR %h", v));
    expect_reg(ADDR_IIR_FCR, 8'hC4, "LSR read cleared OE, data still available");
    for (int i = 0; i < 16; i++) expect_reg(ADDR_RBR_THR, 8'(i), "FIFO order kept on overrun");
    expect_reg(ADDR_LSR, 8'h60, "empty after overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
