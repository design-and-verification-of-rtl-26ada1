// tb_baud_gen: measures the baud rate generator. For several divisors,
// including 54 (100 MHz, 115200 baud) it checks that Baudx16 ticks come
// every divisor cycles, baud ticks every 16*divisor cycles, the baud clock
// is high for 8 and low for 8 Baudx16 periods, that divisor 0 stops the
// generator and that the start pulse restarts the divisor count.
module tb_baud_gen;
  logic clk = 0, rst_n = 0;
  logic [15:0] div_reg_value = 0;
  logic start_i = 0;
  logic baudx16_clk, baud_clk, baud_tick;
  int checks = 0, failures = 0;
  longint cyc = 0;

  baud_gen #(.DIV_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic measure(input int d);
    longint t16 [0:40];
    longint tb [0:2];
    int n16, nb, hi;
    @(negedge clk);
    div_reg_value = 16'(d); start_i = 1;
    @(negedge clk);
    start_i = 0;
    n16 = 0; nb = 0; hi = 0;
    while (n16 <= 40) begin
      @(posedge clk); #1;
      if (baudx16_clk) begin t16[n16] = cyc; n16++; end
      if (baud_tick && nb < 3) begin tb[nb] = cyc; nb++; end
      if (baudx16_clk && baud_clk) hi++;
    end
    for (int i = 1; i <= 40; i++)
      check(t16[i] - t16[i-1] == d, $sformatf("div %0d x16 period %0d", d, t16[i]-t16[i-1]));
    // first tick comes d cycles after the start pulse
    check(nb >= 2 && tb[1] - tb[0] == 16 * d, $sformatf("div %0d baud period", d));
    // after k ticks the baud clock is bit 3 of k: high for k mod 16 in 8..15
    check(hi == 18, $sformatf("div %0d baud clock duty %0d/41", d, hi));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // divisor 0: nothing
    repeat (100) begin
      @(posedge clk); #1;
      check(!baudx16_clk && !baud_tick, "divisor 0 must stop the generator");
    end
    measure(54);
    measure(2);
    measure(1);
    measure(7);
    // start pulse: first tick exactly d cycles after start
    begin
      longint t0;
      @(negedge clk);
      div_reg_value = 16'd10; start_i = 1;
      @(negedge clk); start_i = 0; t0 = cyc;
      do begin @(posedge clk); #1; end while (!baudx16_clk);
      check(cyc - t0 == 10, $sformatf("restart latency %0d", cyc - t0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
