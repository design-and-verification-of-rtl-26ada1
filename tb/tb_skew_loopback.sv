// tb_skew_loopback: drives a random bit stream through the skewed loopback
// and checks that the output equals the input delayed by the selected number
// of clock cycles, for random delays including 0 and the maximum.
module tb_skew_loopback;
  logic clk = 0, rst_n = 0;
  logic [7:0] skew_sel;
  logic din, dout;
  logic hist [0:1023];
  int checks = 0, failures = 0;

  skew_loopback #(.SKEW_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 1; skew_sel = 0;
    for (int i = 0; i < 1024; i++) hist[i] = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      skew_sel = (blk == 0) ? 8'd0 : (blk == 1) ? 8'd255 : 8'($urandom);
      for (int t = 0; t < 600; t++) begin
        @(negedge clk);
        for (int i = 1023; i > 0; i--) hist[i] = hist[i-1];
        din = 1'($urandom);
        hist[0] = din;
        #1;
        checks++;
        if (dout !== hist[skew_sel]) begin
          failures++;
          if (failures < 10) $display("FAIL skew=%0d t=%0d", skew_sel, t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
