// daio_host_if: microprocessor bus interface and register controller.
//
// Decodes host accesses, holds the RXMODE/TXMODE registers and the sticky
// flags of RXSTAT/TXSTAT, routes reads from the receive buffer and writes to
// the transmit buffer, and raises interrupt or DMA requests.
//
// Bus: cs selects the chip for one clock per access, rw = 1 reads, 0 writes.
// A[5:2] selects the register (see daio_pkg::reg_t), A[1] the half in 16-bit
// mode (mode32 = 0), where data travels on D[15:0] and the host alternates
// left (A[1] = 0) and right halves. Read data is combinational (dout, with doe
// driving the external three-state buffer); writes take effect at the clock
// edge. TX data registers are write-only and read as zero.
//
// Status: RXSTAT[0] buffer full, [1] inside a block, [15:8] frame count,
// [26] overflow, [27] biphase violation in data, [28] parity error, [29]
// sync lost; TXSTAT[0] buffer empty, [15:8] frame count, [26] underrun. Bits
// 26..29 are sticky and cleared by writing 1 to them.
//
// Requests: with MODE[6] = 0 (programmed IO) rxirq is raised while the
// receive buffer is full and txirq while the enabled transmitter's buffer is
// empty. With MODE[6] = 1 rxreq/txreq are raised instead (txreq also before
// transmit is enabled, so the buffer can be filled first). Each rxack (txack)
// reads (writes) the next buffer half or word in order, with an internal
// pointer reset whenever the buffer is reloaded or transferred. Interrupt,
// DMA, 16/32-bit and error-bit positions 26..29 follow the chip description;
// the other register bits and the pointer scheme are this design's choices.
module daio_host_if import daio_pkg::*; (
  input  logic       clk,
  input  logic       rst,
  // host bus
  input  logic       cs,
  input  logic       rw,
  input  logic [5:1] addr,
  input  logic       mode32,
  input  word_t      din,
  output word_t      dout,
  output logic       doe,
  input  logic       rxack,
  input  logic       txack,
  output logic       rxreq,
  output logic       txreq,
  output logic       rxirq,
  output logic       txirq,
  // mode and status
  output word_t      rxmode,
  output word_t      txmode,
  output word_t      rxstat,
  output word_t      txstat,
  input  logic       rx_full,
  input  logic       rx_load,
  input  logic       rx_in_block,
  input  logic [7:0] rx_frame_count,
  input  logic       rx_overflow,
  input  logic       rx_err_viol,
  input  logic       rx_err_parity,
  input  logic       rx_err_sync,
  input  logic       tx_full,
  input  logic       tx_xfer,
  input  logic       tx_underrun,
  input  logic [7:0] tx_frame_count,
  // receive buffer read port
  output logic       rxbuf_rd,
  output logic [2:0] rxbuf_idx,
  output logic       rxbuf_half,
  input  word_t      rxbuf_data,
  // transmit buffer write port
  output logic       txbuf_wr,
  output logic [2:0] txbuf_idx,
  output logic       txbuf_half,
  output word_t      txbuf_data
);

  reg_t       rsel;
  logic       half, host_rd, host_wr, dma_rd, dma_wr;
  logic [3:0] rx_ptr, tx_ptr;
  logic [3:0] rx_sticky, tx_sticky;
  word_t      rdata;

  assign rsel    = reg_t'(addr[5:2]);
  assign half    = addr[1];
  assign host_rd = cs && rw;
  assign host_wr = cs && !rw;
  assign dma_rd  = rxack && !cs;
  assign dma_wr  = txack && !cs;

  // 16-bit write merge: the selected half of old takes din[15:0]
  function automatic word_t merge(input word_t old, input word_t d, input logic m32, input logic h);
    if (m32)    return d;
    else if (h) return {old[31:16], d[15:0]};
    else        return {d[15:0], old[15:0]};
  endfunction

  function automatic word_t pick(input word_t w, input logic m32, input logic h);
    if (m32)    return w;
    else if (h) return {16'd0, w[15:0]};
    else        return {16'd0, w[31:16]};
  endfunction

  assign rxstat = {2'b00, rx_sticky, 10'd0, rx_frame_count, 6'd0, rx_in_block, rx_full};
  assign txstat = {5'd0, tx_sticky[0], 10'd0, tx_frame_count, 7'd0, !tx_full};

  // receive buffer port
  assign rxbuf_rd   = dma_rd || (host_rd && rsel <= REG_RXCTRL);
  assign rxbuf_idx  = dma_rd ? rx_ptr[3:1] : addr[4:2];
  assign rxbuf_half = dma_rd ? rx_ptr[0] : half;

  // transmit buffer port
  assign txbuf_wr   = dma_wr || (host_wr && rsel >= REG_TXDATA01 && rsel <= REG_TXCTRL);
  assign txbuf_idx  = dma_wr ? tx_ptr[3:1] : 3'(rsel - REG_TXDATA01);
  assign txbuf_half = dma_wr ? tx_ptr[0] : half;
  assign txbuf_data = din;

  always_comb begin
    rdata = '0;
    if (dma_rd) rdata = rxbuf_data;
    else begin
      unique case (rsel)
        REG_RXDATA01, REG_RXDATA23, REG_RXDATA45, REG_RXDATA67, REG_RXCTRL:
                     rdata = rxbuf_data;
        REG_RXMODE:  rdata = pick(rxmode, mode32, half);
        REG_RXSTAT:  rdata = pick(rxstat, mode32, half);
        REG_TXMODE:  rdata = pick(txmode, mode32, half);
        REG_TXSTAT:  rdata = pick(txstat, mode32, half);
        default:     rdata = '0;
      endcase
    end
  end

  assign dout = rdata;
  assign doe  = host_rd || dma_rd;

  assign rxirq = rxmode[MODE_EN] && !rxmode[MODE_DMA] && rx_full;
  assign rxreq = rxmode[MODE_EN] &&  rxmode[MODE_DMA] && rx_full;
  assign txirq = txmode[MODE_EN] && !txmode[MODE_DMA] && !tx_full;
  assign txreq = txmode[MODE_DMA] && !tx_full;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rxmode    <= '0;
      txmode    <= '0;
      rx_sticky <= '0;
      tx_sticky <= '0;
      rx_ptr    <= '0;
      tx_ptr    <= '0;
    end else begin
      // sticky error flags: set by events, cleared by writing 1
      begin
        logic [3:0] rclr, tclr;
        word_t      wv;
        wv   = merge('0, din, mode32, half);
        rclr = (host_wr && rsel == REG_RXSTAT) ? wv[29:26] : 4'd0;
        tclr = (host_wr && rsel == REG_TXSTAT) ? wv[29:26] : 4'd0;
        rx_sticky <= (rx_sticky & ~rclr) | {rx_err_sync, rx_err_parity, rx_err_viol, rx_overflow};
        tx_sticky <= (tx_sticky & ~tclr) | {3'd0, tx_underrun};
      end
      if (host_wr && rsel == REG_RXMODE) rxmode <= merge(rxmode, din, mode32, half);
      if (host_wr && rsel == REG_TXMODE) txmode <= merge(txmode, din, mode32, half);
      if (rx_load)     rx_ptr <= '0;
      else if (dma_rd) rx_ptr <= rx_ptr + (mode32 ? 4'd2 : 4'd1);
      if (tx_xfer)     tx_ptr <= '0;
      else if (dma_wr) tx_ptr <= tx_ptr + (mode32 ? 4'd2 : 4'd1);
    end
  end

endmodule
