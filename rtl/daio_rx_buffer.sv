// daio_rx_buffer: host-side receive buffer (second half of the double buffer).
//
// When the receive sequencer completes four frames (load), the four RXDATA
// words and RXCTRL are copied here and full is set; the receive registers are
// then free to assemble the next four frames while the host reads these. The
// host reads word rd_idx (0..3 data, 4 control) with a one-clock rd strobe;
// in 32-bit mode a read takes the whole word, in 16-bit mode it takes the
// half chosen by rd_half (0: left/upper, 1: right/lower) on rd_data[15:0].
// The buffer counts as emptied once every half of all five words has been
// read, which clears full. A load while still full overwrites the unread
// data and pulses overflow. The overflow rule follows the chip description;
// the "all halves read" notion of empty is this design's choice.
module daio_rx_buffer import daio_pkg::*; (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   load,
  input  word_t [BUF_FRAMES-1:0] rxdata,
  input  word_t                  rxctrl,
  input  logic                   rd,
  input  logic [2:0]             rd_idx,
  input  logic                   rd_half,
  input  logic                   mode32,
  output word_t                  rd_data,
  output logic                   full,
  output logic                   overflow
);

  word_t [BUF_WORDS-1:0]    store;
  logic  [2*BUF_WORDS-1:0]  read_mask;   // bit 2w: left half, 2w+1: right half
  logic  [2*BUF_WORDS-1:0]  mask_next;
  logic                     idx_ok;

  assign idx_ok = (rd_idx < 3'(BUF_WORDS));

  always_comb begin
    rd_data = '0;
    if (idx_ok) begin
      if (mode32)       rd_data = store[rd_idx];
      else if (rd_half) rd_data = {16'd0, store[rd_idx][15:0]};
      else              rd_data = {16'd0, store[rd_idx][31:16]};
    end
    mask_next = read_mask;
    if (rd && idx_ok) begin
      if (mode32 || !rd_half) mask_next[{rd_idx, 1'b0}] = 1'b1;
      if (mode32 ||  rd_half) mask_next[{rd_idx, 1'b1}] = 1'b1;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      store     <= '0;
      read_mask <= '0;
      full      <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      overflow <= load && full;
      if (load) begin
        store     <= {rxctrl, rxdata};
        read_mask <= '0;
        full      <= 1'b1;
      end else begin
        read_mask <= mask_next;
        if (full && (&mask_next)) full <= 1'b0;
      end
    end
  end

endmodule
