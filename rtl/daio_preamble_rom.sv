// daio_preamble_rom: the six hard-coded subframe headers of the transmitter.
//
// A header is 24 line cells, sent first cell first from bit 23: the 8-cell
// preamble followed by 8 zero source bits in biphase-mark code. Each preamble
// exists in two polarities, starting with cells 11 or 00; the trailing zeros
// then alternate 11 00 ... or 00 11 ... so that the header ends on the level
// it was entered from. Preamble cells as printed for the AES format:
// preamble 1 (block start) 11101000, preamble 2 (subframe A) 11100010,
// preamble 3 (subframe B) 11100100, and their complements. Combinational.
module daio_preamble_rom import daio_pkg::*; (
  input  preamble_t   kind,
  input  logic        start_one,   // 1: header starts with cells 11
  output logic [23:0] cells
);

  logic [7:0] pre;

  always_comb begin
    unique case (kind)
      PRE_BLOCK: pre = 8'b1110_1000;
      PRE_A:     pre = 8'b1110_0010;
      PRE_B:     pre = 8'b1110_0100;
      default:   pre = 8'b1110_0010;
    endcase
    cells = {pre, 16'b1100_1100_1100_1100};
    if (!start_one) cells = ~cells;
  end

endmodule
