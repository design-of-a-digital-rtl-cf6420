// daio_rx_load: RXDATA01..RXDATA67 and RXCTRL assembly registers.
//
// At the end of each received subframe (load strobe) the 20-bit shift
// register contents are distributed: the audio bits sr[19:4] go to the left
// (subframe A, even index) or right (subframe B, odd index) 16 bits of
// RXDATA(index/2), and V, U, C, P (sr[3:0]) go to RXCTRL so that after eight
// subframes each kind of bit is grouped in one byte: V in [31:24], U in
// [23:16], C in [15:8], P in [7:0], the bit of subframe i at position 7-i of
// its byte. The placement of audio follows the chip description; the exact
// RXCTRL bit order is this design's choice. One clock per load.
module daio_rx_load import daio_pkg::*; (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      load,
  input  logic [2:0]                sub_idx,
  input  logic [SR_BITS-1:0]        sr,
  output word_t [BUF_FRAMES-1:0]    rxdata,
  output word_t                     rxctrl
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rxdata <= '0;
      rxctrl <= '0;
    end else if (load) begin
      if (sub_idx[0]) rxdata[sub_idx[2:1]][15:0]  <= sr[19:4];
      else            rxdata[sub_idx[2:1]][31:16] <= sr[19:4];
      rxctrl[5'd31 - 5'(sub_idx)] <= sr[3];
      rxctrl[5'd23 - 5'(sub_idx)] <= sr[2];
      rxctrl[5'd15 - 5'(sub_idx)] <= sr[1];
      rxctrl[5'd7  - 5'(sub_idx)] <= sr[0];
    end
  end

endmodule
