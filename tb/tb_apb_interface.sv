// tb_apb_interface: checks the APB slave front end cycle by cycle.
// Drives write and read transfers (single, back-to-back, with Pread low, and
// an ACCESS without SETUP) and compares WE_O, RD_O, PREADY and the state
// register with values worked out from the transfer sequence.
module tb_apb_interface;
  import uart_pkg::*;

  logic pclk = 1'b0, presetn = 1'b0;
  logic psel = 0, penable = 0, pwrite = 0, pread = 0;
  logic we_o, rd_o, pready_o;
  apb_state_e state_o;
  int checks = 0, failures = 0;
  int n_we = 0, n_rd = 0;

  apb_interface dut (.*);

  always #5 pclk = ~pclk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(input logic e_we, input logic e_rd, input logic e_rdy,
                              input apb_state_e e_st);
    #1;
    checks++;
    if (we_o !== e_we || rd_o !== e_rd || pready_o !== e_rdy || state_o !== e_st) begin
      failures++;
      $display("FAIL t=%0t we=%b/%b rd=%b/%b rdy=%b/%b st=%0d/%0d", $time,
               we_o, e_we, rd_o, e_rd, pready_o, e_rdy, state_o, e_st);
    end
    if (we_o) n_we++;
    if (rd_o) n_rd++;
    @(posedge pclk);
    #1;
  endtask

  task automatic drive(input logic s, input logic en, input logic w, input logic r);
    psel = s; penable = en; pwrite = w; pread = r;
  endtask

  initial begin
    repeat (3) @(posedge pclk);
    presetn = 1'b1;
    @(posedge pclk); #1;
    // idle
    drive(0, 0, 0, 0); expect_cycle(0, 0, 0, S_IDLE);
    // write: SETUP, ACCESS
    drive(1, 0, 1, 0); expect_cycle(0, 0, 0, S_IDLE);
    drive(1, 1, 1, 0); expect_cycle(1, 0, 1, S_SETUP);
    // back-to-back read: SETUP, ACCESS
    drive(1, 0, 0, 1); expect_cycle(0, 0, 0, S_ACCESS);
    drive(1, 1, 0, 1); expect_cycle(0, 1, 1, S_SETUP);
    // read with Pread low: no strobe
    drive(1, 0, 0, 0); expect_cycle(0, 0, 0, S_ACCESS);
    drive(1, 1, 0, 0); expect_cycle(0, 0, 1, S_SETUP);
    drive(0, 0, 0, 0); expect_cycle(0, 0, 0, S_ACCESS);
    drive(0, 0, 0, 0); expect_cycle(0, 0, 0, S_IDLE);
    // random legal transfers
    for (int i = 0; i < 200; i++) begin
      logic w;
      w = 1'($urandom);
      drive(1, 0, w, !w); expect_cycle(0, 0, 0, dut.state_q);
      drive(1, 1, w, !w); expect_cycle(w, !w, 1, S_SETUP);
      if ($urandom % 2) begin
        drive(0, 0, 0, 0); expect_cycle(0, 0, 0, S_ACCESS);
      end
    end
    checks++;
    if (n_we < 50 || n_rd < 50) begin
      failures++;
      $display("FAIL too few strobes we=%0d rd=%0d", n_we, n_rd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
