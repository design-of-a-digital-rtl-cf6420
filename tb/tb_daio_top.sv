// tb_daio_top: the whole chip end to end, DO looped back into DI.
//
// A single host model serves the bus: it fills the transmit buffer when the
// chip asks (txirq or txreq) and empties the receive buffer when it is full
// (rxirq or rxreq), checking every received four-frame group against the
// group written for transmission. Along the way it goes through 32-bit and
// 16-bit bus mode, programmed IO and DMA, skips one transmit refill
// (underrun: the group goes out as zeros), skips one receive read (overflow,
// seen on the ERROR pin), sends one subframe with a wrong parity bit, runs
// past the end of a 192-frame block, stops the transmitter under a running
// receiver (lost sync) and restarts both on another crystal. Each of these
// events is counted and must occur. The timing checks: a buffer every 2560
// clocks (8 subframes x 32 bits x 10 samples). The chip has no parameters,
// so this is also the full-size run.
module tb_daio_top;
  import daio_pkg::*;

  localparam int GROUPS      = 54;   // receive groups checked on crystal 0
  localparam int UNDERRUN_N  = 9;    // transmit group left unwritten
  localparam int OVERFLOW_M  = 20;   // receive group left unread
  localparam int PARITY_N    = 3;    // transmit group with a bad parity bit

  logic reset = 1, di, do_o, cs = 0, rw = 1, mode32 = 1, rxack = 0, txack = 0;
  logic [3:0] xtal = 0;
  logic clk_sel;
  logic [5:0] addr = 0;
  word_t d_in = 0, d_out;
  logic d_oe, rxreq, txreq, rxirq, txirq, error;

  daio_top dut (.*);
  assign di = do_o;

  always #5  xtal[0] = ~xtal[0];
  always #7  xtal[1] = ~xtal[1];
  always #3  xtal[2] = ~xtal[2];
  always #11 xtal[3] = ~xtal[3];

  int checks = 0, failures = 0;
  int n_tx_pio = 0, n_tx_dma = 0, n_rx_pio = 0, n_rx_dma = 0, n_16 = 0, n_32 = 0;
  int n_underrun = 0, n_overflow = 0, n_error_pin = 0, n_parity = 0, n_sync = 0;
  int n_block_wrap = 0, n_clock_switch = 0;
  word_t [BUF_WORDS-1:0] txsent[int];
  int tx_n = 0, rx_m = 0;
  longint cyc = 0;
  longint rx_times[$];

  always @(posedge clk_sel) cyc++;
  always @(posedge error) n_error_pin++;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired: tx %0d rx %0d", tx_n, rx_m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL at %0d: %s", cyc, msg); end
  endtask

  task automatic bus_write(input reg_t r, input bit h, input word_t d);
    @(negedge clk_sel);
    cs = 1; rw = 0; addr = {r, h, 1'b0}; d_in = d;
    @(negedge clk_sel);
    cs = 0; rw = 1;
  endtask

  task automatic bus_read(input reg_t r, input bit h, output word_t d);
    @(negedge clk_sel);
    cs = 1; rw = 1; addr = {r, h, 1'b0};
    #1;
    d = d_out;
    check(d_oe, "no output enable");
    @(negedge clk_sel);
    cs = 0;
  endtask

  // four frames of random audio with V/U/C/P; P gives even parity
  function automatic word_t [BUF_WORDS-1:0] make_group(input int n);
    word_t [BUF_WORDS-1:0] w;
    w[4] = '0;
    for (int s = 0; s < 8; s++) begin
      logic [15:0] a;
      logic [2:0] vuc;
      a = $urandom;
      vuc = $urandom;
      if (s % 2) w[s/2][15:0] = a; else w[s/2][31:16] = a;
      w[4][31-s] = vuc[2];
      w[4][23-s] = vuc[1];
      w[4][15-s] = vuc[0];
      w[4][7-s]  = ^{a, vuc};
    end
    if (n == PARITY_N) w[4][7] = ~w[4][7];
    return w;
  endfunction

  // in 16-bit mode the left half goes first, as the host must alternate
  task automatic fill_tx(input bit dma);
    word_t [BUF_WORDS-1:0] w;
    w = make_group(tx_n);
    txsent[tx_n] = w;
    for (int i = 0; i < BUF_WORDS; i++) begin
      for (int h = 0; h < (mode32 ? 1 : 2); h++) begin
        word_t d;
        d = mode32 ? w[i] : (h ? {16'd0, w[i][15:0]} : {16'd0, w[i][31:16]});
        if (dma) begin
          @(negedge clk_sel);
          txack = 1; d_in = d;
          @(negedge clk_sel);
          txack = 0;
        end else bus_write(reg_t'(REG_TXDATA01 + i), h[0], d);
      end
    end
    if (dma) n_tx_dma++; else n_tx_pio++;
    if (mode32) n_32++; else n_16++;
    tx_n++;
  endtask

  task automatic drain_rx(input bit dma);
    word_t [BUF_WORDS-1:0] w, e;
    word_t d;
    for (int i = 0; i < BUF_WORDS; i++) begin
      for (int h = 0; h < (mode32 ? 1 : 2); h++) begin
        if (dma) begin
          @(negedge clk_sel);
          rxack = 1;
          #1;
          d = d_out;
          check(d_oe, "no output enable on DMA read");
          @(negedge clk_sel);
          rxack = 0;
        end else bus_read(reg_t'(REG_RXDATA01 + i), h[0], d);
        if (mode32) w[i] = d;
        else if (h) w[i][15:0] = d[15:0];
        else w[i][31:16] = d[15:0];
      end
    end
    e = (rx_m == UNDERRUN_N || !txsent.exists(rx_m)) ? '0 : txsent[rx_m];
    check(w == e, $sformatf("receive group %0d differs: %h expected %h", rx_m, w, e));
    if (dma) n_rx_dma++; else n_rx_pio++;
    rx_m++;
  endtask

  task automatic set_modes(input bit dma, input logic [1:0] clk_field);
    bus_write(REG_TXMODE, 0, 32'h10 | (32'(dma) << 6) | 32'(clk_field));
    bus_write(REG_RXMODE, 0, 32'h30 | (32'(dma) << 6) | 32'(clk_field));
  endtask

  initial begin
    word_t d;
    bit dma, cur_dma, skipped_tx, skipped_rx, wait_underrun;
    longint t0, t1;
    skipped_tx = 0; skipped_rx = 0; wait_underrun = 0; cur_dma = 0;
    repeat (3) @(posedge xtal[0]);
    reset = 0;
    // prefill, then enable both directions on crystal 0
    fill_tx(0);
    set_modes(0, 2'd0);
    while (rx_m < GROUPS) begin
      // bus mode and transfer method by progress
      mode32 = ((rx_m / 6) % 2) == 0;
      dma = (rx_m >= 24 && rx_m < 36);
      if (dma != cur_dma) begin
        set_modes(dma, 2'd0);
        cur_dma = dma;
      end
      @(negedge clk_sel);
      if (error) begin
        bus_read(REG_RXSTAT, mode32 ? 1'b0 : 1'b0, d);
        if (mode32 ? d[STAT_OVF] : d[STAT_OVF - 16]) n_overflow++;
        if (mode32 ? d[STAT_PARITY] : d[STAT_PARITY - 16]) n_parity++;
        bus_write(REG_RXSTAT, 0, mode32 ? 32'hFFFF_FFFF : 32'h0000_FFFF);
        if (n_overflow == 1 && skipped_rx && rx_m == OVERFLOW_M) rx_m++;   // that group was overwritten
      end else if (wait_underrun) begin
        // this group is left unwritten until the transmitter has sent zeros for it
        bus_read(REG_TXSTAT, 0, d);
        if (mode32 ? d[STAT_OVF] : d[STAT_OVF - 16]) begin
          n_underrun++;
          wait_underrun = 0;
          bus_write(REG_TXSTAT, 0, mode32 ? 32'hFFFF_FFFF : 32'h0000_FFFF);
        end else if (rxirq || rxreq) begin
          rx_times.push_back(cyc);
          drain_rx(rxreq && !rxirq);
        end
      end else if (txirq || txreq) begin
        if (tx_n == UNDERRUN_N && !skipped_tx) begin
          skipped_tx = 1;
          wait_underrun = 1;
          txsent[tx_n] = '0;
          tx_n++;
        end else fill_tx(txreq && !txirq);
      end else if (rxirq || rxreq) begin
        if (rx_m == OVERFLOW_M && !skipped_rx) begin
          skipped_rx = 1;
          wait (error);
        end else begin
          rx_times.push_back(cyc);
          drain_rx(rxreq && !rxirq);
        end
      end
      // the block end is passed when the groups of one block have been received
      // (group 48 is the first of the second block: still locked after it)
      if (rx_m > FRAMES_PER_BLOCK / BUF_FRAMES && n_block_wrap == 0) begin
        bus_read(REG_RXSTAT, !mode32, d);
        if (d[STAT_LOCK]) n_block_wrap = 2;
      end
    end
    // receive groups arrive every 2560 clocks
    t0 = rx_times[2]; t1 = rx_times[rx_times.size()-1];
    // (one group was lost to the overflow, so one interval may be doubled)
    begin
      longint n;
      n = (t1 - t0 + 1280) / 2560;
      check((n == rx_times.size()-3 || n == rx_times.size()-2) && (t1 - t0 - 2560*n) < 200 && (2560*n - (t1 - t0)) < 200,
            $sformatf("receive rate: %0d clocks for %0d groups", t1 - t0, rx_times.size()-3));
    end
    // stop the transmitter: the receiver loses sync
    mode32 = 1;
    bus_write(REG_TXMODE, 0, 32'h0);
    repeat (400) @(negedge clk_sel);
    bus_read(REG_RXSTAT, 0, d);
    if (d[STAT_SYNC]) n_sync++;
    check(!d[STAT_LOCK], "still in a block without a transmitter");
    // restart on crystal 1
    bus_write(REG_RXMODE, 0, 32'h0);
    bus_write(REG_RXSTAT, 0, 32'hFFFF_FFFF);
    rx_m = 0; tx_n = 0;
    txsent.delete();
    begin
      realtime ta, tb;
      fill_tx(0);
      set_modes(0, 2'd1);
      @(posedge clk_sel); ta = $realtime;
      @(posedge clk_sel); tb = $realtime;
      if (tb - ta == 14) n_clock_switch++;
      check(tb - ta == 14, "clock not switched to crystal 1");
    end
    while (rx_m < 3) begin
      @(negedge clk_sel);
      if (txirq) fill_tx(0);
      else if (rxirq) drain_rx(0);
    end
    $display("tx pio %0d dma %0d, rx pio %0d dma %0d, 32-bit %0d 16-bit %0d", n_tx_pio, n_tx_dma, n_rx_pio, n_rx_dma, n_32, n_16);
    $display("underrun %0d overflow %0d error pin %0d parity %0d sync lost %0d block wrap %0d clock switch %0d",
             n_underrun, n_overflow, n_error_pin, n_parity, n_sync, n_block_wrap, n_clock_switch);
    check(n_tx_pio > 0 && n_tx_dma > 0 && n_rx_pio > 0 && n_rx_dma > 0, "a transfer method never used");
    check(n_32 > 0 && n_16 > 0, "a bus width never used");
    check(n_underrun > 0, "no underrun");
    check(n_overflow > 0, "no overflow");
    check(n_error_pin > 0, "ERROR pin never raised");
    check(n_parity > 0, "no parity error");
    check(n_sync > 0, "no loss of sync");
    check(n_block_wrap == 2, "block end never passed");
    check(n_clock_switch > 0, "no clock switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
