// daio_pkg: constants and types shared by the DAIO (Digital Audio Input
// Output) blocks.
//
// The AES serial format groups 32-bit subframes (4-bit preamble, 8 unused
// bits, 16 audio bits, V/U/C/P) into 64-bit frames and 192-frame blocks.
// The chip buffers 4 frames (8 subframes) per direction. The receiver
// oversamples each source bit 10 times, so the core clock runs at 640 times
// the audio frame rate; the transmitter emits one line cell (half a source
// bit) every 5 core clocks (128 cells per frame). Register numbers, status
// bit positions other than the error flags, and the mode-bit layout beyond
// clock select, enable and error interrupt enable are this design's own.
package daio_pkg;

  // AES format
  localparam int unsigned SUBFRAME_BITS    = 32;
  localparam int unsigned PREAMBLE_BITS    = 4;
  localparam int unsigned AUDIO_BITS       = 16;
  localparam int unsigned SR_BITS          = 20;   // audio + VUCP kept per subframe
  localparam int unsigned FRAMES_PER_BLOCK = 192;
  localparam int unsigned BUF_FRAMES       = 4;
  localparam int unsigned BUF_SUBFRAMES    = 2 * BUF_FRAMES;
  localparam int unsigned HEADER_CELLS     = 24;   // preamble + 8 coded zero bits

  // Clocking: 10 samples per source bit on receive, 5 core clocks per cell on transmit
  localparam int unsigned SAMPLES_PER_BIT  = 10;
  localparam int unsigned CLKS_PER_CELL    = 5;

  // Preamble kinds as reported by the phase decoder and chosen by the transmitter
  typedef enum logic [1:0] {
    PRE_NONE  = 2'd0,
    PRE_BLOCK = 2'd1,   // preamble 1: subframe A, start of block
    PRE_A     = 2'd2,   // preamble 2: subframe A elsewhere
    PRE_B     = 2'd3    // preamble 3: subframe B
  } preamble_t;

  // Register numbers, taken from address bits A[5:2]; A[1] picks the half in 16-bit mode
  typedef enum logic [3:0] {
    REG_RXDATA01 = 4'd0,
    REG_RXDATA23 = 4'd1,
    REG_RXDATA45 = 4'd2,
    REG_RXDATA67 = 4'd3,
    REG_RXCTRL   = 4'd4,
    REG_RXMODE   = 4'd5,
    REG_RXSTAT   = 4'd6,
    REG_TXDATA01 = 4'd8,
    REG_TXDATA23 = 4'd9,
    REG_TXDATA45 = 4'd10,
    REG_TXDATA67 = 4'd11,
    REG_TXCTRL   = 4'd12,
    REG_TXMODE   = 4'd13,
    REG_TXSTAT   = 4'd14
  } reg_t;

  // MODE register bits
  localparam int unsigned MODE_CLK_LO = 0;   // [1:0] clock select
  localparam int unsigned MODE_EN     = 4;   // direction enable
  localparam int unsigned MODE_ERRIE  = 5;   // error interrupt enable
  localparam int unsigned MODE_DMA    = 6;   // 1: DMA requests, 0: interrupt (programmed IO)

  // STAT register bits
  localparam int unsigned STAT_BUF     = 0;  // RX: buffer full, TX: buffer empty
  localparam int unsigned STAT_LOCK    = 1;  // RX: inside a block
  localparam int unsigned STAT_FC_LO   = 8;  // [15:8] frame count within the block
  localparam int unsigned STAT_OVF     = 26; // RX overflow / TX underrun
  localparam int unsigned STAT_VIOL    = 27; // RX biphase violation inside data
  localparam int unsigned STAT_PARITY  = 28; // RX parity error
  localparam int unsigned STAT_SYNC    = 29; // RX preamble missing or out of sequence

  // Buffer words: 4 data words (two subframes each) and one control word
  localparam int unsigned BUF_WORDS = BUF_FRAMES + 1;

  typedef logic [31:0] word_t;

endpackage
