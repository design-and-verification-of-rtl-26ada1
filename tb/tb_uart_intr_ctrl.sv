// tb_uart_intr_ctrl: exhaustive check of the interrupt priority encoder
// against an independent reference: every IER value and every combination
// of pending sources.
module tb_uart_intr_ctrl;
  import uart_pkg::*;
  logic [3:0] ier;
  logic rls, rda, cto, thre, intr;
  iid_e iir_id;
  logic [3:0] exp_id;
  int checks = 0, failures = 0;

  uart_intr_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 16; e++)
      for (int s = 0; s < 16; s++) begin
        ier = 4'(e);
        {rls, rda, cto, thre} = 4'(s);
        #1;
        exp_id = 4'b0001;
        if (thre && e[1]) exp_id = 4'b0010;
        if (cto && e[0])  exp_id = 4'b1100;
        if (rda && e[0])  exp_id = 4'b0100;
        if (rls && e[2])  exp_id = 4'b0110;
        checks++;
        if (iir_id !== exp_id || intr !== (exp_id != 4'b0001)) begin
          failures++;
          $display("FAIL ier=%b src=%b id=%b exp=%b", ier, s[3:0], iir_id, exp_id);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
