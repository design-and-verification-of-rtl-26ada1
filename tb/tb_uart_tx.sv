// tb_uart_tx: checks the transmitter frame by frame. A Baudx16 tick is
// generated every TP clocks. For every word length, parity mode and stop bit
// setting a random byte is sent; the testbench finds the falling edge of the
// start bit, samples every bit at its middle and compares start bit, data
// (LSB first), parity and stop level with a reference frame. The frame
// length (from start edge to the end of busy) is checked against
// 16*(1+data+parity+1) ticks plus 8 for 1.5 or 16 for 2 stop bits. Two bytes
// queued back to back must start exactly one frame apart. Break
// control must hold the line low and take nothing from the FIFO.
module tb_uart_tx;
  import uart_pkg::*;
  localparam int TP = 3;
  logic clk = 0, rst_n = 0, tick16 = 0;
  lcr_t lcr;
  logic data_avail = 0;
  logic [7:0] data_in = 0;
  logic pop, txd, busy;
  int checks = 0, failures = 0;
  int tdiv = 0;
  longint cyc = 0;
  logic prev_txd = 1'b1;
  always @(posedge clk) cyc <= cyc + 1;
  int n_par = 0, n_stop2 = 0, n_stop15 = 0;

  uart_tx dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    tdiv   <= (tdiv == TP - 1) ? 0 : tdiv + 1;
    tick16 <= (tdiv == TP - 1);
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s t=%0t", msg, $time); end
  endtask

  task automatic send(input logic [7:0] lv, input logic [7:0] b);
    int n, pen, ticks, t, bitclk;
    logic [7:0] d;
    logic exp_par;
    lcr = lcr_t'(lv);
    n = 5 + int'(lcr.wls);
    pen = int'(lcr.pen);
    d = b & 8'(((1 << n) - 1));
    exp_par = lcr.stick ? !lcr.eps : (lcr.eps ? ^d : !(^d));
    ticks = 16 * (n + pen + 2) + (!lcr.stb ? 0 : (n == 5 ? 8 : 16));
    bitclk = 16 * TP;
    @(negedge clk);
    data_avail = 1; data_in = b;
    // wait for the pop, then release the FIFO
    do @(posedge clk); while (!pop);
    @(negedge clk) data_avail = 0;
    // start edge
    while (txd) @(posedge clk);
    t = 0;
    repeat (bitclk / 2) @(posedge clk);
    check(txd == 0, "start bit");
    for (int i = 0; i < n; i++) begin
      repeat (bitclk) @(posedge clk);
      check(txd == d[i], $sformatf("lcr %h data bit %0d", lv, i));
    end
    if (pen) begin
      repeat (bitclk) @(posedge clk);
      check(txd == exp_par, $sformatf("lcr %h parity", lv));
      n_par++;
    end
    repeat (bitclk) @(posedge clk);
    check(txd == 1, "stop bit");
    // remaining time until busy drops: total ticks*TP from the start edge
    t = bitclk / 2 + (n + pen + 1) * bitclk;
    while (busy) begin @(posedge clk); t++; check(txd == 1, "stop level"); end
    check(t >= ticks * TP - 1 && t <= ticks * TP + 1,
          $sformatf("lcr %h frame length %0d exp %0d", lv, t, ticks * TP));
    if (lcr.stb && n == 5) n_stop15++;
    if (lcr.stb && n != 5) n_stop2++;
  endtask

  initial begin
    lcr = lcr_t'(8'h03);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int l = 0; l < 64; l++) send(8'(l), 8'($urandom));
    // back-to-back frames: FFh in 8N1 has one falling edge per frame, at
    // its start; starts must be exactly 160 ticks apart
    begin
      longint e [0:3];
      int k;
      lcr = lcr_t'(8'h03);
      @(negedge clk); data_avail = 1; data_in = 8'hFF;
      k = 0;
      while (k < 4) begin
        @(posedge clk); #1;
        if (txd == 0 && prev_txd == 1) begin e[k] = cyc; k++; end
        prev_txd = txd;
      end
      for (int i = 1; i < 4; i++)
        check(e[i] - e[i-1] == 160 * TP, $sformatf("back-to-back spacing %0d", e[i] - e[i-1]));
      @(negedge clk) data_avail = 0;
      while (busy) @(posedge clk);
    end
    // break: line low, no frame
    lcr = lcr_t'(8'h43);
    @(negedge clk) data_avail = 1;
    repeat (200) begin
      @(posedge clk); #1;
      check(txd == 0 && !pop, "break holds line low");
    end
    lcr = lcr_t'(8'h03);
    @(negedge clk) data_avail = 0;
    check(n_par > 0 && n_stop2 > 0 && n_stop15 > 0, "all frame kinds sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
