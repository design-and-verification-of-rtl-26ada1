// tb_sync_fifo: checks the FIFO at 16 entries (the size of the original design's
// FIFO waveform) against a queue model: fill to full, overrun on a push
// into a full FIFO, drain in order, underrun on a pop from an empty FIFO,
// simultaneous push and pop holding the count, clear, and random traffic.
module tb_sync_fifo;
  localparam int D = 16;
  logic clk = 0, rst_n = 0, clr = 0, push = 0, pop = 0;
  logic [7:0] din = 0, dout;
  logic [4:0] count;
  logic empty, full, overrun, underrun;
  logic [7:0] q [$];
  int checks = 0, failures = 0;
  int n_ovr = 0, n_unr = 0;

  sync_fifo #(.DEPTH(D), .WIDTH(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s t=%0t", msg, $time); end
  endtask

  // one cycle with the given request; model updated, flags checked
  task automatic step(input logic pu, input logic po, input logic [7:0] d);
    bit exp_ovr, exp_unr;
    @(negedge clk);
    push = pu; pop = po; din = d;
    #1;
    check(count == 5'(q.size()), $sformatf("count %0d exp %0d", count, q.size()));
    check(empty == (q.size() == 0) && full == (q.size() == D), "flags");
    if (q.size() > 0) check(dout == q[0], $sformatf("dout %h exp %h", dout, q[0]));
    exp_ovr = pu && q.size() == D;
    exp_unr = po && q.size() == 0;
    if (po && q.size() > 0) void'(q.pop_front());
    if (pu && !exp_ovr) q.push_back(d);
    @(posedge clk); #1;
    push = 0; pop = 0;
    check(overrun == exp_ovr && underrun == exp_unr, "overrun/underrun");
    if (overrun) n_ovr++;
    if (underrun) n_unr++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < D + 2; i++) step(1, 0, 8'(8'h0A + i));
    for (int i = 0; i < D + 2; i++) step(0, 1, 0);
    for (int i = 0; i < 4; i++) step(1, 0, 8'h0c);
    for (int i = 0; i < 10; i++) step(1, 1, 8'(i));
    @(negedge clk); clr = 1; @(negedge clk); clr = 0; q.delete();
    step(0, 0, 0);
    for (int i = 0; i < 3000; i++) step(1'($urandom), 1'($urandom), 8'($urandom));
    check(n_ovr > 0 && n_unr > 0, "overrun and underrun both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
