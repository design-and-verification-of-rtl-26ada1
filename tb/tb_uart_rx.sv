// tb_uart_rx: checks the receiver against a serial-line driver in the
// testbench. Ticks of the 16x reference come every TP clocks and frames are
// started at random clock offsets, so the receiver sees no fixed phase. It
// checks: good frames for every line setting (data and no error flags),
// injected parity errors, a framing error followed directly by the next
// start bit (self recovery: both characters must be received), a short
// glitch (invalid start bit, nothing received), and a break: the all-zero
// character with a framing error comes first, then the break pulse after one
// character time, 16*(start+data+parity+stop) ticks from the falling edge.
module tb_uart_rx;
  import uart_pkg::*;
  localparam int TP = 3;
  localparam int BIT = 16 * TP;
  logic clk = 0, rst_n = 0, tick16 = 0;
  lcr_t lcr;
  logic rxd = 1;
  logic push, pe, fe, brk;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int tdiv = 0;
  longint cyc = 0, t_brk = 0, t_push = 0;
  int n_push = 0, n_brk = 0;
  logic [9:0] got [$];
  int n_pe = 0, n_fe = 0, n_recover = 0;

  uart_rx dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc    <= cyc + 1;
    tdiv   <= (tdiv == TP - 1) ? 0 : tdiv + 1;
    tick16 <= (tdiv == TP - 1);
  end
  always @(posedge clk) begin
    if (push) begin got.push_back({fe, pe, data}); n_push++; t_push = cyc; end
    if (brk) begin n_brk++; t_brk = cyc; end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s t=%0t", msg, $time); end
  endtask

  function automatic logic ref_par(input lcr_t l, input logic [7:0] d);
    return l.stick ? !l.eps : (l.eps ? ^d : !(^d));
  endfunction

  // Drive data bits (and parity) of one frame after its start bit.
  task automatic frame_body(input lcr_t l, input logic [7:0] d, input bit bad_par);
    int n = 5 + int'(l.wls);
    rxd = 0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < n; i++) begin rxd = d[i]; repeat (BIT) @(posedge clk); end
    if (l.pen) begin rxd = ref_par(l, d) ^ bad_par; repeat (BIT) @(posedge clk); end
  endtask

  task automatic frame(input lcr_t l, input logic [7:0] d, input bit bad_par);
    repeat ($urandom % (2 * TP)) @(posedge clk);
    frame_body(l, d, bad_par);
    rxd = 1; repeat (BIT * (l.stb ? 2 : 1)) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  task automatic expect_char(input logic [7:0] d, input bit e_pe, input bit e_fe, input string what);
    logic [9:0] g;
    check(got.size() == 1, $sformatf("%s: %0d characters received", what, got.size()));
    if (got.size() > 0) begin
      g = got.pop_front();
      check(g == {e_fe, e_pe, d}, $sformatf("%s: got %b exp %b", what, g, {e_fe, e_pe, d}));
    end
    got.delete();
  endtask

  initial begin
    lcr = lcr_t'(8'h03);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (50) @(posedge clk);
    // every line setting, good frames and parity errors
    for (int l = 0; l < 64; l++) begin
      logic [7:0] d;
      bit bp;
      lcr = lcr_t'(8'(l));
      d = 8'($urandom) & (8'hFF >> (3 - lcr.wls));
      if (d == 0) d = 1;
      bp = lcr.pen && ($urandom % 2);
      frame(lcr, d, bp);
      expect_char(d, bp, 0, $sformatf("lcr %h", l));
      if (bp) n_pe++;
    end
    // framing error immediately followed by the next start bit
    lcr = lcr_t'(8'h1b);                     // 8 bits, even parity
    frame_body(lcr, 8'h5a, 0);               // stop position is low ...
    frame_body(lcr, 8'hc3, 0);               // ... and starts the next frame
    rxd = 1; repeat (BIT * 2) @(posedge clk);
    check(got.size() == 2, $sformatf("self recovery: %0d characters", got.size()));
    if (got.size() == 2) begin
      check(got[0] == {1'b1, 1'b0, 8'h5a}, $sformatf("first char %b", got[0]));
      check(got[1] == {1'b0, 1'b0, 8'hc3}, $sformatf("second char %b", got[1]));
      n_fe++; n_recover++;
    end
    got.delete();
    // invalid start bit: 4 ticks low
    rxd = 0; repeat (4 * TP) @(posedge clk); rxd = 1;
    repeat (BIT * 12) @(posedge clk);
    check(got.size() == 0, "glitch must not start a frame");
    // break: 8 data bits, no parity; line low for two character times
    lcr = lcr_t'(8'h03);
    begin
      longint t0;
      int nb0;
      nb0 = n_brk;
      @(posedge clk); rxd = 0; t0 = cyc + 1;
      repeat (BIT * 20) @(posedge clk);
      rxd = 1;
      repeat (BIT * 3) @(posedge clk);
      check(n_brk == nb0 + 1, "one break pulse");
      check(got.size() == 1 && got[0] == {1'b1, 1'b0, 8'h00}, "break character with framing error");
      check(t_push < t_brk, "framing error reported before break");
      // 16*(1+8+0+1) = 160 ticks (counter 9Fh down to 00h)
      check((t_brk - t0) >= 160 * TP - 2 * TP && (t_brk - t0) <= 161 * TP + 2 * TP + 4,
            $sformatf("break after %0d cycles, exp ~%0d", t_brk - t0, 160 * TP));
      got.delete();
    end
    // receiver works again after the break
    frame(lcr, 8'h96, 0);
    expect_char(8'h96, 0, 0, "after break");
    check(n_pe > 0 && n_fe > 0 && n_recover > 0 && n_brk > 0, "all error kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
