// tb_daio_host_if: bus decoding and register controller.
//
// Checks MODE register writes and read-back in 32- and 16-bit mode, status
// word composition, sticky error flags set by event pulses and cleared by
// writing 1, routing of buffer reads and writes by address, interrupt versus
// DMA requests by mode, and the DMA word pointers that step through the
// buffers and restart on a buffer load or transfer.
module tb_daio_host_if;
  import daio_pkg::*;
  logic clk = 0, rst = 1;
  logic cs = 0, rw = 1, mode32 = 1, rxack = 0, txack = 0;
  logic [5:1] addr = 0;
  word_t din = 0, dout;
  logic doe, rxreq, txreq, rxirq, txirq;
  word_t rxmode, txmode, rxstat, txstat;
  logic rx_full = 0, rx_load = 0, rx_in_block = 0, rx_overflow = 0, rx_err_viol = 0, rx_err_parity = 0, rx_err_sync = 0;
  logic tx_full = 0, tx_xfer = 0, tx_underrun = 0;
  logic [7:0] rx_frame_count = 0, tx_frame_count = 0;
  logic rxbuf_rd, rxbuf_half, txbuf_wr, txbuf_half;
  logic [2:0] rxbuf_idx, txbuf_idx;
  word_t rxbuf_data, txbuf_data;
  int checks = 0, failures = 0;

  daio_host_if dut (.*);
  always #5 clk = ~clk;
  // receive buffer stand-in: word index in the top byte, half in bit 0
  assign rxbuf_data = {5'(rxbuf_idx), 26'h0, rxbuf_half};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic bus_write(input reg_t r, input bit h, input word_t d);
    @(negedge clk);
    cs = 1; rw = 0; addr = {r, h}; din = d;
    #1;
    if (r >= REG_TXDATA01 && r <= REG_TXCTRL)
      check(txbuf_wr && txbuf_idx == 3'(r - REG_TXDATA01) && txbuf_half == h && txbuf_data == d, "tx buffer write routing");
    else
      check(!txbuf_wr, "stray tx buffer write");
    @(negedge clk);
    cs = 0; rw = 1;
  endtask

  task automatic bus_read(input reg_t r, input bit h, output word_t d);
    @(negedge clk);
    cs = 1; rw = 1; addr = {r, h};
    #1;
    d = dout;
    check(doe, "no output enable on read");
    check(rxbuf_rd == (r <= REG_RXCTRL), "rx buffer read strobe");
    @(negedge clk);
    cs = 0;
    #1;
    check(!doe, "output enable without access");
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    word_t d;
    repeat (3) @(posedge clk);
    rst = 0;
    // MODE registers, 32-bit
    bus_write(REG_RXMODE, 0, 32'h0000_0032);
    bus_write(REG_TXMODE, 0, 32'h0000_0013);
    check(rxmode == 32'h32 && txmode == 32'h13, "mode write");
    bus_read(REG_RXMODE, 0, d); check(d == 32'h32, "rxmode read");
    // 16-bit halves
    mode32 = 0;
    bus_write(REG_RXMODE, 0, 32'h0000_ABCD);
    check(rxmode == 32'hABCD_0032, "rxmode left half write");
    bus_read(REG_RXMODE, 0, d); check(d == 32'h0000_ABCD, "left half read");
    bus_read(REG_RXMODE, 1, d); check(d == 32'h0000_0032, "right half read");
    bus_write(REG_RXMODE, 0, 32'h0);
    mode32 = 1;
    // buffer reads by address
    for (int r = 0; r < 5; r++) begin
      bus_read(reg_t'(r), 0, d);
      check(d == {5'(r), 27'h0}, $sformatf("rx buffer word %0d", r));
    end
    for (int r = 8; r < 13; r++) bus_write(reg_t'(r), 0, $urandom);
    bus_read(REG_TXDATA01, 0, d); check(d == 0, "tx data reads as zero");
    // status word
    rx_full = 1; rx_in_block = 1; rx_frame_count = 8'd77; tx_frame_count = 8'd5;
    @(negedge clk);
    bus_read(REG_RXSTAT, 0, d); check(d == 32'h0000_4D03, $sformatf("rxstat %h", d));
    bus_read(REG_TXSTAT, 0, d); check(d == 32'h0000_0501, $sformatf("txstat %h", d));
    // sticky flags
    pulse(rx_overflow); pulse(rx_err_parity); pulse(tx_underrun);
    check(rxstat[29:26] == 4'b0101 && txstat[26], "sticky flags not set");
    bus_write(REG_RXSTAT, 0, 32'h1 << 26);
    check(rxstat[29:26] == 4'b0100, "write-one-to-clear");
    pulse(rx_err_viol); pulse(rx_err_sync);
    check(rxstat[29:26] == 4'b1110, "viol/sync flags");
    bus_write(REG_RXSTAT, 0, 32'hFFFF_FFFF);
    bus_write(REG_TXSTAT, 0, 32'hFFFF_FFFF);
    check(rxstat[29:26] == 0 && !txstat[26], "flags not cleared");
    // interrupts (programmed IO)
    rx_full = 1; tx_full = 0;
    bus_write(REG_RXMODE, 0, 32'h10);
    bus_write(REG_TXMODE, 0, 32'h10);
    #1;
    check(rxirq && txirq && !rxreq && !txreq, "programmed IO requests");
    rx_full = 0; tx_full = 1;
    #1;
    check(!rxirq && !txirq, "requests without cause");
    // DMA
    bus_write(REG_RXMODE, 0, 32'h50);
    bus_write(REG_TXMODE, 0, 32'h40);   // transmit not yet enabled: prefill by DMA
    rx_full = 1; tx_full = 0;
    #1;
    check(rxreq && txreq && !rxirq && !txirq, "DMA requests");
    for (int k = 0; k < 5; k++) begin
      @(negedge clk);
      rxack = 1;
      #1;
      check(doe && rxbuf_rd && rxbuf_idx == 3'(k) && dout == {5'(k), 27'h0}, $sformatf("DMA read %0d", k));
      @(negedge clk);
      rxack = 0;
    end
    mode32 = 0;
    pulse(rx_load);
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      rxack = 1;
      #1;
      check(rxbuf_idx == 3'(k/2) && rxbuf_half == k[0], $sformatf("16-bit DMA read %0d", k));
      @(negedge clk);
      rxack = 0;
    end
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      txack = 1; din = k;
      #1;
      check(txbuf_wr && txbuf_idx == 3'(k/2) && txbuf_half == k[0] && txbuf_data == k, $sformatf("DMA write %0d", k));
      @(negedge clk);
      txack = 0;
    end
    pulse(tx_xfer);
    @(negedge clk);
    txack = 1;
    #1;
    check(txbuf_idx == 0 && txbuf_half == 0, "DMA pointer not restarted");
    @(negedge clk);
    txack = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
