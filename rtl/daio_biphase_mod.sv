// daio_biphase_mod: biphase-mark encoder of the transmitter.
//
// Each source bit becomes two line cells. The first cell always differs
// from the previous line level (every doublet starts with a transition); the
// second equals the first for a 0 and differs for a 1. The encoder keeps the
// line level in a register updated on every cell_en. While the header shift
// register drives the line (track high) the level follows track_val, so the
// encoder continues seamlessly from the header's last cell. cell_out is
// combinational from level, half and bit_in; the caller registers the line.
// The coding rule follows the chip description; the tracking input is this
// design's way of hand-over from the header.
module daio_biphase_mod (
  input  logic clk,
  input  logic rst,
  input  logic cell_en,     // one pulse per line cell
  input  logic half,        // 0: first cell of the doublet, 1: second
  input  logic bit_in,      // source bit being coded
  input  logic track,       // header is driving the line
  input  logic track_val,   // header cell on the line
  output logic cell_out,
  output logic level
);

  assign cell_out = half ? (level ^ bit_in) : ~level;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)          level <= 1'b0;
    else if (cell_en) level <= track ? track_val : cell_out;
  end

endmodule
