// uart_core: one 16550-style UART channel (UART 0..3 of the quad UART).
// It holds the register file, a transmit and a receive FIFO (FIFO_DEPTH
// entries each, 128 in the original design description), the transmitter, the receiver, the
// baud rate generator, the character time-out counter and the interrupt
// controller. Registers on the 3-bit address (16550 map):
//   0  read RBR (pops RX FIFO) / write THR (pushes TX FIFO); DLL if LCR[7]
//   1  IER [3:0]                                             ; DLM if LCR[7]
//   2  read IIR {2'b11, 2'b00, id[3:0]} / write FCR
//      (FCR[1] clears RX FIFO, FCR[2] clears TX FIFO, FCR[7:6] trigger 1/4/8/14)
//   3  LCR
//   5  LSR {RX FIFO error, TEMT, THRE, BI, FE, PE, OE, DR}
//   4, 6, 7 read as zero (no modem or scratch registers).
// we and rd are one-cycle strobes from the APB interface; read data is
// combinational and read side effects (FIFO pop, flag clears) happen on the
// clock edge that ends the strobe. Writing DLL or DLM restarts the baud
// generator one cycle later.
// Interrupt conditions: THR empty is raised when the TX FIFO becomes empty and
// cleared by a THR write or by reading IIR while it is the source; received
// data available while the RX FIFO holds at least the trigger level; line
// status while OE, PE, FE or BI is set (all cleared by reading LSR);
// character time-out when a counter of 4 character times
// (character time = 16 ticks x (start + data bits + stop bits), parity not
// counted) runs out with no RX FIFO push or pop while it holds data, cleared
// by reading RBR. The original design description gives these conditions and clear events; the
// register map, IER/FCR/LSR bit positions, trigger levels and reset values
// (LCR = 8N1, divisor 0 = baud generator stopped) are the 16550's or this
// design's choices. Parity and framing errors are sticky flags set when an
// erroneous character enters the RX FIFO; LSR[7] counts such characters
// still in the FIFO.
module uart_core
  import uart_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 128,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH) + 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic       rd,
  input  logic [2:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       intr,
  output logic       txd,
  input  logic       rxd
);

  lcr_t       lcr;
  logic [3:0] ier;
  logic [7:0] dll, dlm;
  logic [1:0] trig_sel;
  logic       div_start;

  // ---------------- register writes --------------------------------------
  logic wr_thr, wr_dl, wr_fcr, rd_rbr, rd_iir, rd_lsr;
  assign wr_thr = we && addr == ADDR_RBR_THR && !lcr.dlab;
  assign wr_fcr = we && addr == ADDR_IIR_FCR;
  assign wr_dl  = we && lcr.dlab && (addr == ADDR_RBR_THR || addr == ADDR_IER);
  assign rd_rbr = rd && addr == ADDR_RBR_THR && !lcr.dlab;
  assign rd_iir = rd && addr == ADDR_IIR_FCR;
  assign rd_lsr = rd && addr == ADDR_LSR;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcr       <= lcr_t'(8'h03);
      ier       <= '0;
      dll       <= '0;
      dlm       <= '0;
      trig_sel  <= '0;
      div_start <= 1'b0;
    end else begin
      div_start <= wr_dl;
      if (we) begin
        unique case (addr)
          ADDR_RBR_THR: if (lcr.dlab) dll <= wdata;
          ADDR_IER:     if (lcr.dlab) dlm <= wdata; else ier <= wdata[3:0];
          ADDR_IIR_FCR: trig_sel <= wdata[7:6];
          ADDR_LCR:     lcr <= lcr_t'(wdata);
          default: ;
        endcase
      end
    end
  end

  // ---------------- baud rate generator -----------------------------------
  logic tick16, baud_clk, baud_tick;
  baud_gen #(.DIV_W(16)) u_baud (
    .clk(clk), .rst_n(rst_n), .div_reg_value({dlm, dll}), .start_i(div_start),
    .baudx16_clk(tick16), .baud_clk(baud_clk), .baud_tick(baud_tick)
  );

  // ---------------- transmit path -----------------------------------------
  logic [7:0]  tx_dout;
  logic [CW-1:0] tx_count;
  logic        tx_empty, tx_full, tx_ovr, tx_unr, tx_pop, tx_busy;

  sync_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(8)) u_tx_fifo (
    .clk(clk), .rst_n(rst_n), .clr(wr_fcr && wdata[2]),
    .push(wr_thr), .pop(tx_pop), .din(wdata), .dout(tx_dout),
    .count(tx_count), .empty(tx_empty), .full(tx_full),
    .overrun(tx_ovr), .underrun(tx_unr)
  );

  uart_tx u_tx (
    .clk(clk), .rst_n(rst_n), .tick16(tick16), .lcr(lcr),
    .data_avail(!tx_empty), .data_in(tx_dout), .pop(tx_pop),
    .txd(txd), .busy(tx_busy)
  );

  // ---------------- receive path ------------------------------------------
  logic       rx_push, rx_pe, rx_fe, rx_brk;
  logic [7:0] rx_data;
  logic [9:0] rx_dout;
  logic [CW-1:0] rx_count;
  logic       rx_empty, rx_full, rx_ovr, rx_unr, rx_pop;

  uart_rx u_rx (
    .clk(clk), .rst_n(rst_n), .tick16(tick16), .lcr(lcr), .rxd(rxd),
    .push(rx_push), .data(rx_data), .pe(rx_pe), .fe(rx_fe), .brk(rx_brk)
  );

  assign rx_pop = rd_rbr;

  sync_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(10)) u_rx_fifo (
    .clk(clk), .rst_n(rst_n), .clr(wr_fcr && wdata[1]),
    .push(rx_push), .pop(rx_pop), .din({rx_fe, rx_pe, rx_data}), .dout(rx_dout),
    .count(rx_count), .empty(rx_empty), .full(rx_full),
    .overrun(rx_ovr), .underrun(rx_unr)
  );

  // ---------------- line status -------------------------------------------
  logic oe, pe, fe, bi;
  logic [CW-1:0] err_cnt;   // characters with PE/FE still in the RX FIFO
  logic push_err, pop_err;

  assign push_err = rx_push && !rx_full && (rx_pe || rx_fe);
  assign pop_err  = rx_pop && !rx_empty && (rx_dout[9] || rx_dout[8]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oe <= 1'b0; pe <= 1'b0; fe <= 1'b0; bi <= 1'b0;
      err_cnt <= '0;
    end else begin
      if (rd_lsr) begin
        oe <= 1'b0; pe <= 1'b0; fe <= 1'b0; bi <= 1'b0;
      end
      if (rx_push && rx_full)  oe <= 1'b1;
      if (rx_push && rx_pe)    pe <= 1'b1;
      if (rx_push && rx_fe)    fe <= 1'b1;
      if (rx_brk)              bi <= 1'b1;
      if (wr_fcr && wdata[1])  err_cnt <= '0;
      else if (push_err && !pop_err) err_cnt <= err_cnt + 1'b1;
      else if (pop_err && !push_err) err_cnt <= err_cnt - 1'b1;
    end
  end

  logic [7:0] lsr;
  assign lsr = {(err_cnt != '0), tx_empty && !tx_busy, tx_empty, bi, fe, pe, oe, !rx_empty};

  // ---------------- character time-out -----------------------------------
  logic [9:0] cto_cnt, cto_load;
  logic [5:0] stop_ticks;
  logic       cto;

  assign stop_ticks = !lcr.stb ? 6'd16 : (lcr.wls == 2'd0 ? 6'd24 : 6'd32);
  assign cto_load   = 10'd4 * (10'd16 * (10'd1 + 10'(data_bits(lcr))) + 10'(stop_ticks));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cto_cnt <= '0;
      cto     <= 1'b0;
    end else if (rx_push || rx_pop || rx_empty) begin
      cto_cnt <= cto_load;
      if (rx_pop || rx_empty) cto <= 1'b0;
    end else if (tick16) begin
      if (cto_cnt == '0) cto <= 1'b1;
      else               cto_cnt <= cto_cnt - 1'b1;
    end
  end

  // ---------------- interrupts -------------------------------------------
  logic thre_int, tx_empty_d;
  iid_e iir_id;
  logic [CW-1:0] trig_level;
  logic rda;

  always_comb begin
    unique case (trig_sel)
      2'd0: trig_level = CW'(1);
      2'd1: trig_level = CW'(4);
      2'd2: trig_level = CW'(8);
      default: trig_level = CW'(14);
    endcase
  end
  assign rda = (rx_count >= trig_level);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thre_int   <= 1'b0;
      tx_empty_d <= 1'b0;
    end else begin
      tx_empty_d <= tx_empty;
      if (wr_thr || (rd_iir && iir_id == IID_THRE))
        thre_int <= 1'b0;
      else if (tx_empty && !tx_empty_d)
        thre_int <= 1'b1;
      else if (we && addr == ADDR_IER && !lcr.dlab && wdata[1] && !ier[1] && tx_empty)
        thre_int <= 1'b1;
    end
  end

  uart_intr_ctrl u_intr (
    .ier(ier), .rls(oe || pe || fe || bi), .rda(rda), .cto(cto),
    .thre(thre_int), .intr(intr), .iir_id(iir_id)
  );

  // ---------------- read data ---------------------------------------------
  always_comb begin
    unique case (addr)
      ADDR_RBR_THR: rdata = lcr.dlab ? dll : rx_dout[7:0];
      ADDR_IER:     rdata = lcr.dlab ? dlm : {4'b0000, ier};
      ADDR_IIR_FCR: rdata = {4'b1100, iir_id};
      ADDR_LCR:     rdata = lcr;
      ADDR_LSR:     rdata = lsr;
      default:      rdata = 8'h00;
    endcase
  end

endmodule
