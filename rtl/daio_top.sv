// daio_top: Digital Audio Input Output chip.
//
// Full-duplex bridge between AES biphase-mark serial audio (DI in, DO out)
// and a 16/32-bit microprocessor bus. Receive: phase decoder -> 20-bit shift
// register -> RXDATA/RXCTRL assembly (receive sequencer) -> host receive
// buffer. Transmit: host transmit buffer -> TX registers, preamble ROM,
// header and data shift registers, biphase encoder -> DO. The host interface
// holds the MODE and STAT registers; the mode controller picks the chip clock
// from the four crystal inputs and enables each direction.
//
// Clocking: every register runs on clk_sel, the crystal selected by the
// enabled direction's MODE[1:0] (XTAL10 after reset). It must be 640 times
// the frame rate (10 samples per received bit; one transmitted cell every 5
// clocks). Host bus signals are sampled on clk_sel and must be synchronous to
// it; clk_sel is brought out for that purpose. reset is asynchronous, active
// high. The bidirectional D[31:0] pads are outside this module: d_out is
// driven onto the bus while d_oe is high, d_in is the bus value.
module daio_top import daio_pkg::*; (
  input  logic       reset,
  input  logic [3:0] xtal,
  output logic       clk_sel,
  input  logic       di,
  output logic       do_o,
  input  logic       cs,
  input  logic       rw,
  input  logic [5:0] addr,
  input  logic       mode32,
  input  word_t      d_in,
  output word_t      d_out,
  output logic       d_oe,
  input  logic       rxack,
  input  logic       txack,
  output logic       rxreq,
  output logic       txreq,
  output logic       rxirq,
  output logic       txirq,
  output logic       error
);

  logic clk;
  logic run_receive, run_transmit;
  logic [1:0] clk_idx;
  word_t rxmode, txmode, rxstat, txstat;

  // receive path
  logic       bit_valid, bit_val, bit_viol, pre_valid, locked;
  preamble_t  pre_type;
  logic [SR_BITS-1:0] sr;
  logic       rx_load, buf_load, in_block, err_viol, err_parity, err_sync;
  logic [2:0] rx_sub;
  logic [7:0] rx_frame_count;
  word_t [BUF_FRAMES-1:0] rxdata;
  word_t      rxctrl, rxbuf_data;
  logic       rx_full, rx_overflow, rxbuf_rd, rxbuf_half;
  logic [2:0] rxbuf_idx;

  // transmit path
  word_t [BUF_WORDS-1:0] tx_words;
  logic       tx_full, tx_xfer, tx_underrun, tx_cell_en;
  logic [7:0] tx_frame_count;
  logic [2:0] tx_sub;
  logic       txbuf_wr, txbuf_half;
  logic [2:0] txbuf_idx;
  word_t      txbuf_data;

  daio_mode_ctrl u_mode (
    .reset        (reset),
    .xtal         (xtal),
    .rx_en        (rxmode[MODE_EN]),
    .rx_clk       (rxmode[MODE_CLK_LO +: 2]),
    .rx_errie     (rxmode[MODE_ERRIE]),
    .tx_en        (txmode[MODE_EN]),
    .tx_clk       (txmode[MODE_CLK_LO +: 2]),
    .rx_errors    (rxstat[STAT_SYNC:STAT_OVF]),
    .clk_idx      (clk_idx),
    .clk_sel      (clk),
    .run_receive  (run_receive),
    .run_transmit (run_transmit),
    .error        (error)
  );

  assign clk_sel = clk;

  daio_phase_decoder u_pd (
    .clk       (clk),
    .rst       (reset),
    .en        (run_receive),
    .din       (di),
    .bit_valid (bit_valid),
    .bit_val   (bit_val),
    .bit_viol  (bit_viol),
    .pre_valid (pre_valid),
    .pre_type  (pre_type),
    .locked    (locked)
  );

  daio_rx_shift u_rxsr (
    .clk   (clk),
    .rst   (reset),
    .clear (!run_receive),
    .shift (bit_valid),
    .din   (bit_val),
    .q     (sr)
  );

  daio_rx_control u_rxctl (
    .clk         (clk),
    .rst         (reset),
    .en          (run_receive),
    .bit_valid   (bit_valid),
    .bit_val     (bit_val),
    .bit_viol    (bit_viol),
    .pre_valid   (pre_valid),
    .pre_type    (pre_type),
    .load        (rx_load),
    .sub_idx     (rx_sub),
    .buf_load    (buf_load),
    .frame_count (rx_frame_count),
    .in_block    (in_block),
    .err_viol    (err_viol),
    .err_parity  (err_parity),
    .err_sync    (err_sync)
  );

  daio_rx_load u_rxload (
    .clk     (clk),
    .rst     (reset),
    .load    (rx_load),
    .sub_idx (rx_sub),
    .sr      (sr),
    .rxdata  (rxdata),
    .rxctrl  (rxctrl)
  );

  daio_rx_buffer u_rxbuf (
    .clk      (clk),
    .rst      (reset),
    .load     (buf_load),
    .rxdata   (rxdata),
    .rxctrl   (rxctrl),
    .rd       (rxbuf_rd),
    .rd_idx   (rxbuf_idx),
    .rd_half  (rxbuf_half),
    .mode32   (mode32),
    .rd_data  (rxbuf_data),
    .full     (rx_full),
    .overflow (rx_overflow)
  );

  daio_tx_buffer u_txbuf (
    .clk       (clk),
    .rst       (reset),
    .wr        (txbuf_wr),
    .wr_idx    (txbuf_idx),
    .wr_half   (txbuf_half),
    .mode32    (mode32),
    .wr_data   (txbuf_data),
    .xfer      (tx_xfer),
    .out_words (tx_words),
    .full      (tx_full)
  );

  daio_tx_control u_txctl (
    .clk         (clk),
    .rst         (reset),
    .en          (run_transmit),
    .buf_words   (tx_words),
    .buf_full    (tx_full),
    .xfer        (tx_xfer),
    .underrun    (tx_underrun),
    .dout        (do_o),
    .frame_count (tx_frame_count),
    .sub_idx     (tx_sub),
    .cell_en     (tx_cell_en)
  );

  daio_host_if u_host (
    .clk            (clk),
    .rst            (reset),
    .cs             (cs),
    .rw             (rw),
    .addr           (addr[5:1]),
    .mode32         (mode32),
    .din            (d_in),
    .dout           (d_out),
    .doe            (d_oe),
    .rxack          (rxack),
    .txack          (txack),
    .rxreq          (rxreq),
    .txreq          (txreq),
    .rxirq          (rxirq),
    .txirq          (txirq),
    .rxmode         (rxmode),
    .txmode         (txmode),
    .rxstat         (rxstat),
    .txstat         (txstat),
    .rx_full        (rx_full),
    .rx_load        (buf_load),
    .rx_in_block    (in_block),
    .rx_frame_count (rx_frame_count),
    .rx_overflow    (rx_overflow),
    .rx_err_viol    (err_viol),
    .rx_err_parity  (err_parity),
    .rx_err_sync    (err_sync),
    .tx_full        (tx_full),
    .tx_xfer        (tx_xfer),
    .tx_underrun    (tx_underrun),
    .tx_frame_count (tx_frame_count),
    .rxbuf_rd       (rxbuf_rd),
    .rxbuf_idx      (rxbuf_idx),
    .rxbuf_half     (rxbuf_half),
    .rxbuf_data     (rxbuf_data),
    .txbuf_wr       (txbuf_wr),
    .txbuf_idx      (txbuf_idx),
    .txbuf_half     (txbuf_half),
    .txbuf_data     (txbuf_data)
  );

endmodule
