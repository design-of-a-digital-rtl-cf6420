// daio_tx_buffer: host-side transmit buffer (first half of the double buffer).
//
// The host writes the four TXDATA words (two subframes each, subframe A in
// the left 16 bits) and TXCTRL (V in [31:24], U in [23:16], C in [15:8],
// P in [7:0], subframe i at position 7-i of each byte) with a one-clock wr
// strobe: whole words in 32-bit mode, or the half selected by wr_half
// (0: left, 1: right) from wr_data[15:0] in 16-bit mode. full is set once
// every half of all five words has been written since the last transfer.
// On xfer the transmitter copies the words into its TX registers (out_words,
// or zeros when the buffer was not full, so missing data goes out as zero
// subframes), and the buffer starts collecting the next four frames. A write
// in the same clock as xfer counts towards the next buffer. The zero fill
// follows the chip description; the "all halves written" rule is this
// design's choice.
module daio_tx_buffer import daio_pkg::*; (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  wr,
  input  logic [2:0]            wr_idx,
  input  logic                  wr_half,
  input  logic                  mode32,
  input  word_t                 wr_data,
  input  logic                  xfer,
  output word_t [BUF_WORDS-1:0] out_words,   // [0..3] TXDATA01..67, [4] TXCTRL
  output logic                  full
);

  word_t [BUF_WORDS-1:0]   store;
  logic  [2*BUF_WORDS-1:0] wr_mask, set_bits;
  logic                    idx_ok;

  assign idx_ok    = (wr_idx < 3'(BUF_WORDS));
  assign full      = &wr_mask;
  assign out_words = full ? store : '0;

  always_comb begin
    set_bits = '0;
    if (wr && idx_ok) begin
      if (mode32 || !wr_half) set_bits[{wr_idx, 1'b0}] = 1'b1;
      if (mode32 ||  wr_half) set_bits[{wr_idx, 1'b1}] = 1'b1;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      store   <= '0;
      wr_mask <= '0;
    end else begin
      if (wr && idx_ok) begin
        if (mode32)       store[wr_idx]        <= wr_data;
        else if (wr_half) store[wr_idx][15:0]  <= wr_data[15:0];
        else              store[wr_idx][31:16] <= wr_data[15:0];
      end
      wr_mask <= (xfer ? '0 : wr_mask) | set_bits;
    end
  end

endmodule
