// daio_tx_control: transmit sequencer and serializer of the DAIO.
//
// Holds the TX registers (TXDATA01..67 and TXCTRL), the 24-bit header shift
// register fed from the preamble ROM, the 20-bit data shift register, the
// biphase-mark encoder, the header/data output multiplexer and the DO output
// register. One line cell is produced every CLKS_PER_CELL core clocks
// (5 at 640 x frame rate gives the 128 cells per frame of the AES line).
//
// A subframe is 64 cells: 24 header cells shifted straight out (preamble and
// 8 coded zero bits) followed by 20 source bits from the data shift register
// (16 audio bits, MSB first, then V, U, C, P), each coded into two cells, so
// the data register shifts at half the cell rate. Subframe A of frame 0 gets
// preamble 1, other A subframes preamble 2, B subframes preamble 3. After
// every B subframe frame_count advances (modulo 192). When transmission is
// enabled, and after every eighth subframe, xfer copies the host buffer into
// the TX registers (zeros if the host did not fill it; underrun pulses).
//
// The polarity of each header must be fixed before the last data cell of the
// previous subframe is on the line. This design computes it when the data
// shift register is loaded: a biphase-mark bit flips the line level once for
// a 0 and twice for a 1, so over 20 bits the final level equals the starting
// level XOR the parity of the 20 bits; the header starts with the opposite
// cell. (A header always ends on the level it started from.) The chip
// description reaches the same choice by an XOR look-ahead over the last
// doublets. DO is registered on the cell clock (a flip-flop stands in for the
// output D-latch of the original). Latency: the first cell appears on DO
// CLKS_PER_CELL clocks after the first clock edge that sees en high. When
// the host buffer is not full at a transfer, zeros are loaded instead.
module daio_tx_control import daio_pkg::*; #(
  parameter int unsigned CLKS_PER_CELL_P = CLKS_PER_CELL
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  word_t [BUF_WORDS-1:0] buf_words,
  input  logic                  buf_full,
  output logic                  xfer,
  output logic                  underrun,
  output logic                  dout,
  output logic [7:0]            frame_count,
  output logic [2:0]            sub_idx,
  output logic                  cell_en
);

  localparam int unsigned CW = (CLKS_PER_CELL_P > 1) ? $clog2(CLKS_PER_CELL_P) : 1;

  logic [CW-1:0]           cdiv;
  logic                    running;
  word_t [BUF_WORDS-1:0]   txregs, src, fresh;
  logic [HEADER_CELLS-1:0] hdr;
  logic [SR_BITS-1:0]      dsr;
  logic [5:0]              cellcnt;
  logic                    lvl;          // line level at the start of the next header
  logic                    start, sub_end, loading;
  logic [2:0]              nsub;
  logic [7:0]              nframe;
  preamble_t               nkind;
  logic [HEADER_CELLS-1:0] rom_cells;
  logic [SR_BITS-1:0]      nword;
  logic                    in_hdr, mod_cell, line;

  assign cell_en = running && (cdiv == CW'(CLKS_PER_CELL_P - 1));
  assign start   = en && !running;
  assign sub_end = cell_en && (cellcnt == 6'd63);
  assign loading = start || sub_end;
  assign xfer    = start || (sub_end && sub_idx == 3'(BUF_SUBFRAMES - 1));
  assign fresh   = buf_full ? buf_words : '0;
  assign src     = xfer ? fresh : txregs;

  always_comb begin
    if (start) begin
      nsub   = '0;
      nframe = '0;
    end else begin
      nsub   = sub_idx + 3'd1;
      nframe = frame_count;
      if (sub_idx[0]) nframe = (frame_count == 8'(FRAMES_PER_BLOCK - 1)) ? 8'd0 : frame_count + 8'd1;
    end
    nkind = nsub[0] ? PRE_B : ((nframe == 8'd0) ? PRE_BLOCK : PRE_A);
    nword = {nsub[0] ? src[nsub[2:1]][15:0] : src[nsub[2:1]][31:16],
             src[4][5'd31 - 5'(nsub)], src[4][5'd23 - 5'(nsub)],
             src[4][5'd15 - 5'(nsub)], src[4][5'd7 - 5'(nsub)]};
  end

  daio_preamble_rom u_rom (
    .kind      (nkind),
    .start_one (start ? 1'b1 : ~lvl),
    .cells     (rom_cells)
  );

  assign in_hdr = (cellcnt < 6'(HEADER_CELLS));

  daio_biphase_mod u_mod (
    .clk       (clk),
    .rst       (rst),
    .cell_en   (cell_en),
    .half      (cellcnt[0]),
    .bit_in    (dsr[SR_BITS-1]),
    .track     (in_hdr),
    .track_val (hdr[HEADER_CELLS-1]),
    .cell_out  (mod_cell),
    .level     ()
  );

  assign line = in_hdr ? hdr[HEADER_CELLS-1] : mod_cell;

  // The polarity look-ahead must agree with the coded line: the last cell of
  // a subframe ends on the level the next header was chosen for.
  a_polarity: assert property (@(posedge clk) disable iff (rst) sub_end |-> (line == lvl));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cdiv        <= '0;
      running     <= 1'b0;
      txregs      <= '0;
      hdr         <= '0;
      dsr         <= '0;
      cellcnt     <= '0;
      lvl         <= 1'b0;
      sub_idx     <= '0;
      frame_count <= '0;
      dout        <= 1'b0;
      underrun    <= 1'b0;
    end else begin
      underrun <= xfer && !buf_full;
      if (!en) begin
        running <= 1'b0;
        cdiv    <= '0;
        dout    <= 1'b0;
      end else begin
        if (running) cdiv <= (cdiv == CW'(CLKS_PER_CELL_P - 1)) ? '0 : cdiv + CW'(1);
        if (start) running <= 1'b1;
        if (cell_en) begin
          dout    <= line;
          cellcnt <= cellcnt + 6'd1;
          if (in_hdr) hdr <= {hdr[HEADER_CELLS-2:0], 1'b0};
          else if (cellcnt[0]) dsr <= {dsr[SR_BITS-2:0], 1'b0};
        end
        if (xfer) txregs <= fresh;
        if (loading) begin
          hdr         <= rom_cells;
          dsr         <= nword;
          lvl         <= (start ? 1'b0 : lvl) ^ (^nword);
          cellcnt     <= '0;
          sub_idx     <= nsub;
          frame_count <= nframe;
        end
      end
    end
  end

endmodule
