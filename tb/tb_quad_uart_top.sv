// tb_quad_uart_top: end-to-end test of the quad UART through its APB port.
// All four channels run at different baud rates (divisors 2..5) with their
// transmitters looped back to their receivers through random skews. The
// channel under test is drawn the way the design's verification plan
// describes: a random number is generated from a seed and its two low bits
// select the UART. Each channel must get its characters back unchanged,
// frame timing must match 10 bits x 16 x divisor clocks, and every
// mechanism of the design must happen at least once: back-to-back APB
// transfers, THR-empty, data-available, time-out, line-status interrupts
// from a parity error (one channel receives another channel's frames with
// the wrong parity), from a framing error and from a break, and an RX FIFO
// overrun. RX/TX FIFOs are reduced to 16 entries to keep overrun short.
module tb_quad_uart_top;
  import uart_pkg::*;
  localparam int DEPTH = 16;
  logic pclk = 0, presetn = 0;
  logic intr_out;
  logic [3:0] tx_out, rx_in, loopback;
  logic [3:0][7:0] skew_sel;
  int checks = 0, failures = 0;
  int div [4] = '{2, 3, 4, 5};
  int n_thre = 0, n_rda = 0, n_cto = 0, n_pe = 0, n_fe = 0, n_bi = 0, n_oe = 0;
  int n_sel [4] = '{0, 0, 0, 0};
  int n_chars = 0, n_skew = 0;

  apb_bfm bus (.pclk(pclk));

  quad_uart_top #(.FIFO_DEPTH(DEPTH)) dut (
    .pclk(pclk), .presetn(presetn), .psel(bus.psel), .pselect(bus.pselect),
    .penable(bus.penable), .pwrite(bus.pwrite), .pread(bus.pread),
    .paddr(bus.paddr), .pwdata(bus.pwdata), .prdata(bus.prdata),
    .pready(bus.pready), .intr_out(intr_out), .tx_out(tx_out), .rx_in(rx_in),
    .loopback(loopback), .skew_sel(skew_sel)
  );

  // when not looped back, channel i listens to channel i+1
  assign rx_in = {tx_out[0], tx_out[3:1]};

  always #5 pclk = ~pclk;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s t=%0t", msg, $time); end
  endtask

  task automatic expect_reg(input int ch, input logic [2:0] a, input logic [7:0] e, input string what);
    logic [7:0] d;
    bus.read(2'(ch), a, d);
    check(d === e, $sformatf("ch%0d %s: reg %0d = %h exp %h", ch, what, a, d, e));
  endtask

  task automatic iir_is(input int ch, input logic [7:0] e, ref int counter, input string what);
    logic [7:0] d;
    bus.read(2'(ch), ADDR_IIR_FCR, d);
    check(d === e, $sformatf("ch%0d %s: IIR %h exp %h", ch, what, d, e));
    if (d === e) counter++;
  endtask

  // Wait for a start edge on tx_out[ch]; return its cycle.
  task automatic start_edge(input int ch, output longint t);
    while (tx_out[ch]) @(posedge pclk);
    t = cyc;
  endtask

  longint cyc = 0;
  always @(posedge pclk) cyc <= cyc + 1;

  initial begin
    logic [7:0] v;
    static int unsigned seeds [4] = '{12, 15, 31, 7};
    int sel;
    int dummy;
    loopback = 4'hF;
    for (int i = 0; i < 4; i++) begin
      skew_sel[i] = 8'($urandom);
      if (skew_sel[i] != 0) n_skew++;
    end
    repeat (3) @(posedge pclk);
    #1 presetn = 1;
    // configure every channel: divisor, 8N1, all interrupts
    for (int ch = 0; ch < 4; ch++) begin
      bus.write(2'(ch), ADDR_LCR, 8'h83, 1'b1);
      bus.write(2'(ch), ADDR_RBR_THR, 8'(div[ch]), 1'b1);
      bus.write(2'(ch), ADDR_IER, 8'h00, 1'b1);
      bus.write(2'(ch), ADDR_LCR, 8'h03);
      bus.write(2'(ch), ADDR_IER, 8'h07);
    end
    check(intr_out, "combined interrupt line raised by THR empty");
    for (int ch = 0; ch < 4; ch++) begin
      iir_is(ch, 8'hC2, n_thre, "THR empty");
      check(intr_out == (ch != 3), $sformatf("Intr_Out with %0d channels pending", 3 - ch));
    end
    check(!intr_out, "all THR-empty interrupts cleared by IIR reads");

    // UART selected from seeded random numbers
    foreach (seeds[k]) begin
      int unsigned r;
      longint ft;
      logic [7:0] data [4];
      r = $urandom(seeds[k]);
      sel = int'(r[1:0]);
      n_sel[sel]++;
      for (int j = 0; j < 4; j++) data[j] = 8'($urandom);
      fork
        start_edge(sel, ft);
        for (int j = 0; j < 4; j++) bus.write(2'(sel), ADDR_RBR_THR, data[j]);
      join
      // first frame: stop bit high up to 160*div clocks after the start
      // edge, then the second start bit follows without a gap
      begin
        bit ok = 1;
        while (cyc < ft + 160 * div[sel]) begin
          @(posedge pclk);
          if (cyc > ft + 144 * div[sel] + 1 && cyc < ft + 160 * div[sel] - 1 && !tx_out[sel]) ok = 0;
        end
        repeat (2) @(posedge pclk);
        if (tx_out[sel]) ok = 0;
        check(ok, $sformatf("ch%0d frame length 160 x divisor %0d", sel, div[sel]));
      end
      while (cyc < ft + 4 * 160 * div[sel] + 300) @(posedge pclk);
      iir_is(sel, 8'hC4, n_rda, "data available");
      for (int j = 0; j < 4; j++) begin
        expect_reg(sel, ADDR_RBR_THR, data[j], "looped-back data");
        n_chars++;
      end
      iir_is(sel, 8'hC2, n_thre, "THR empty after sending");
    end
    // every channel round trip, others too
    for (int ch = 0; ch < 4; ch++) begin
      if (n_sel[ch] == 0) begin
        bus.write(2'(ch), ADDR_RBR_THR, 8'(8'h40 + ch));
        repeat (12 * 16 * div[ch] + 300) @(posedge pclk);
        expect_reg(ch, ADDR_RBR_THR, 8'(8'h40 + ch), "round trip");
        n_chars++;
        iir_is(ch, 8'hC2, n_thre, "THR empty");
      end
    end
    // character time-out: trigger 4 on channel 1, two characters only
    bus.write(1, ADDR_IIR_FCR, 8'h40);
    bus.write(1, ADDR_RBR_THR, 8'h5A);
    bus.write(1, ADDR_RBR_THR, 8'hA5);
    repeat (2 * 10 * 16 * div[1] + 4 * 10 * 16 * div[1] + 400) @(posedge pclk);
    iir_is(1, 8'hCC, n_cto, "character time-out");
    expect_reg(1, ADDR_RBR_THR, 8'h5A, "time-out data 0");
    expect_reg(1, ADDR_RBR_THR, 8'hA5, "time-out data 1");
    iir_is(1, 8'hC2, dummy, "THR empty");
    // framing error and break: channel 3 (divisor 5) sends a break over its
    // loopback. The frame error shows at the middle of the stop position
    // (152 ticks), the break after one character time (160 ticks).
    begin
      longint t0;
      bus.write(3, ADDR_LCR, 8'h43);
      start_edge(3, t0);
      while (cyc < t0 + skew_sel[3] + 152 * div[3] + 20) @(posedge pclk);
      bus.read(3, ADDR_LSR, v);
      check(v[3] && !v[4], $sformatf("framing error first, LSR %h", v));
      if (v[3] && !v[4]) n_fe++;
      while (cyc < t0 + skew_sel[3] + 170 * div[3]) @(posedge pclk);
      iir_is(3, 8'hC6, n_bi, "line status, break");
      bus.read(3, ADDR_LSR, v);
      check(v[4], $sformatf("break, LSR %h", v));
      bus.write(3, ADDR_LCR, 8'h03);
      repeat (2 * 16 * div[3]) @(posedge pclk);
      expect_reg(3, ADDR_RBR_THR, 8'h00, "break character");
    end
    // parity error: channel 3 sends even parity, channel 2 expects odd
    loopback[2] = 1'b0;
    bus.write(3, ADDR_LCR, 8'h83);
    bus.write(3, ADDR_RBR_THR, 8'(div[2]));
    bus.write(3, ADDR_LCR, 8'h1B);
    bus.write(2, ADDR_LCR, 8'h0B);
    bus.write(3, ADDR_RBR_THR, 8'h33);
    repeat (12 * 16 * div[2] + 300) @(posedge pclk);
    iir_is(2, 8'hC6, n_pe, "line status, parity error");
    bus.read(2, ADDR_LSR, v);
    check(v[2] && v[7] && v[0], $sformatf("LSR parity error %h", v));
    expect_reg(2, ADDR_RBR_THR, 8'h33, "data with parity error");
    // overrun on channel 0: DEPTH+1 characters
    for (int i = 0; i <= DEPTH; i++) bus.write(0, ADDR_RBR_THR, 8'(i));
    repeat ((DEPTH + 2) * 10 * 16 * div[0] + 300) @(posedge pclk);
    bus.read(0, ADDR_IIR_FCR, v);
    check(v == 8'hC6, $sformatf("overrun IIR %h", v));
    bus.read(0, ADDR_LSR, v);
    check(v[1], $sformatf("overrun LSR %h", v));
    if (v[1]) n_oe++;
    for (int i = 0; i < DEPTH; i++) expect_reg(0, ADDR_RBR_THR, 8'(i), "data kept on overrun");

    // every mechanism must have happened
    check(bus.n_b2b > 0, "back-to-back APB transfers");
    check(bus.n_ready_err == 0, "PREADY high in every ACCESS cycle");
    check(n_thre > 0, "THR-empty interrupt");
    check(n_rda > 0, "data-available interrupt");
    check(n_cto > 0, "character time-out interrupt");
    check(n_pe > 0, "parity error");
    check(n_fe > 0, "framing error");
    check(n_bi > 0, "break");
    check(n_oe > 0, "overrun");
    check(n_skew > 0, "non-zero loopback skew");
    check(n_chars >= 16, "characters looped back");
    $display("mechanisms: xfers=%0d b2b=%0d thre=%0d rda=%0d cto=%0d pe=%0d fe=%0d bi=%0d oe=%0d sel=%0d/%0d/%0d/%0d chars=%0d",
             bus.n_xfer, bus.n_b2b, n_thre, n_rda, n_cto, n_pe, n_fe, n_bi, n_oe,
             n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_chars);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
