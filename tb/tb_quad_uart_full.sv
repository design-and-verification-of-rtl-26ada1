// tb_quad_uart_full: the quad UART at its default size (128-entry FIFOs)
// and at the original design's example rate: divisor 54 = 100 MHz / (115200 x 16),
// so one bit is 864 clocks. All four channels are looped back with random
// skews and run at the same time. Channel 0 fills its 128-entry transmit
// FIFO, everything is received into its 128-entry receive FIFO, and one more
// character must raise overrun; channels 1..3 each send 16 characters.
// The bit time is checked on the line, and every received character is
// compared with what was sent.
module tb_quad_uart_full;
  import uart_pkg::*;
  localparam int DIV = 54;
  localparam int DEPTH = 128;
  logic pclk = 0, presetn = 0;
  logic intr_out;
  logic [3:0] tx_out, rx_in, loopback;
  logic [3:0][7:0] skew_sel;
  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [7:0] sent [4][$];

  apb_bfm bus (.pclk(pclk));

  quad_uart_top dut (
    .pclk(pclk), .presetn(presetn), .psel(bus.psel), .pselect(bus.pselect),
    .penable(bus.penable), .pwrite(bus.pwrite), .pread(bus.pread),
    .paddr(bus.paddr), .pwdata(bus.pwdata), .prdata(bus.prdata),
    .pready(bus.pready), .intr_out(intr_out), .tx_out(tx_out), .rx_in(rx_in),
    .loopback(loopback), .skew_sel(skew_sel)
  );

  assign rx_in = '1;
  always #5 pclk = ~pclk;
  always @(posedge pclk) cyc <= cyc + 1;

  initial begin
    #40000000;   // 4M cycles
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s t=%0t", msg, $time); end
  endtask

  initial begin
    logic [7:0] v, d;
    longint t0, t1;
    loopback = 4'hF;
    for (int i = 0; i < 4; i++) skew_sel[i] = 8'($urandom);
    repeat (3) @(posedge pclk);
    #1 presetn = 1;
    for (int ch = 0; ch < 4; ch++) begin
      bus.write(2'(ch), ADDR_LCR, 8'h83, 1'b1);
      bus.write(2'(ch), ADDR_RBR_THR, 8'(DIV), 1'b1);
      bus.write(2'(ch), ADDR_IER, 8'h00, 1'b1);
      bus.write(2'(ch), ADDR_LCR, 8'h03);
    end
    // channel 0: 128 characters fill the transmit FIFO
    for (int i = 0; i < DEPTH; i++) begin
      d = 8'($urandom);
      sent[0].push_back(d);
      bus.write(0, ADDR_RBR_THR, d, 1'b1);
    end
    for (int ch = 1; ch < 4; ch++)
      for (int i = 0; i < 16; i++) begin
        d = 8'($urandom);
        sent[ch].push_back(d);
        bus.write(2'(ch), ADDR_RBR_THR, d);
      end
    // frame period on channel 0, where frames follow back to back: from
    // one start edge (the falling edge after a stop bit) to the next
    while (!(tx_out[0] == 1 && dut.g_uart[0].u_uart.u_tx.state == dut.g_uart[0].u_uart.u_tx.TX_STOP_ONE)) @(posedge pclk);
    while (tx_out[0]) @(posedge pclk);
    t0 = cyc;
    @(posedge pclk);
    while (!(tx_out[0] == 1 && dut.g_uart[0].u_uart.u_tx.state == dut.g_uart[0].u_uart.u_tx.TX_STOP_ONE)) @(posedge pclk);
    while (tx_out[0]) @(posedge pclk);
    t1 = cyc;
    check(t1 - t0 == 10 * 16 * DIV, $sformatf("frame period %0d exp %0d (bit 864 clocks)", t1 - t0, 10 * 16 * DIV));
    // wait for all of channel 0 to arrive
    repeat ((DEPTH + 2) * 10 * 16 * DIV) @(posedge pclk);
    bus.read(0, ADDR_LSR, v);
    check(v[0] && !v[1], $sformatf("ch0 FIFO holds data, no overrun yet: LSR %h", v));
    bus.write(0, ADDR_RBR_THR, 8'hEE);
    repeat (12 * 16 * DIV) @(posedge pclk);
    bus.read(0, ADDR_LSR, v);
    check(v[1] == 1'b1, $sformatf("overrun on the 129th character: LSR %h", v));
    for (int ch = 0; ch < 4; ch++) begin
      automatic int n = sent[ch].size();
      for (int i = 0; i < n; i++) begin
        bus.read(2'(ch), ADDR_RBR_THR, v);
        check(v == sent[ch][i], $sformatf("ch%0d char %0d: %h exp %h", ch, i, v, sent[ch][i]));
      end
      bus.read(2'(ch), ADDR_LSR, v);
      check(v == 8'h60, $sformatf("ch%0d empty and idle at the end: LSR %h", ch, v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
