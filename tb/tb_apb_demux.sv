// tb_apb_demux: exhaustive check of the 1-4 demultiplexer: for every select
// value and strobe combination the one-hot strobes and the returned read
// data are compared with the expected values.
module tb_apb_demux;
  logic [1:0] sel;
  logic we_i, rd_i;
  logic [3:0] we_o, rd_o;
  logic [3:0][7:0] rdata_i;
  logic [7:0] rdata_o;
  int checks = 0, failures = 0;

  apb_demux #(.NUM_UART(4)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 50; rep++)
      for (int s = 0; s < 4; s++)
        for (int k = 0; k < 4; k++) begin
          sel = 2'(s); we_i = k[0]; rd_i = k[1];
          for (int c = 0; c < 4; c++) rdata_i[c] = 8'($urandom);
          #1;
          checks++;
          if (we_o !== (4'(we_i) << s) || rd_o !== (4'(rd_i) << s) ||
              rdata_o !== rdata_i[s]) begin
            failures++;
            $display("FAIL sel=%0d we=%b rd=%b -> %b %b %h", s, we_i, rd_i, we_o, rd_o, rdata_o);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
