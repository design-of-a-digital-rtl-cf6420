// daio_tb_pkg: reference models shared by the DAIO testbenches.
//
// aes_subframe_cells builds the 64 line cells of one AES subframe the way the
// format defines it, cell by cell: the 8 preamble cells (block start
// 11101000, subframe A 11100010, subframe B 11100100, complemented when the
// line is high before it), then 28 source bits (8 zero bits, 16 audio bits
// MSB first, V, U, C, P), each a doublet that starts with a level change and
// changes again in the middle for a 1. The line level is carried between
// calls. decode_subframe_cells does the reverse for checking a transmitter.
package daio_tb_pkg;

  typedef logic [63:0] cells_t;   // cell 0 in bit 63

  function automatic logic [27:0] subframe_bits(input logic [15:0] audio, input logic [3:0] vucp);
    return {8'd0, audio, vucp};
  endfunction

  // even parity over the 27 bits before P
  function automatic logic parity_bit(input logic [15:0] audio, input logic [2:0] vuc);
    return ^{audio, vuc};
  endfunction

  // kind: 1 block start, 2 subframe A, 3 subframe B
  function automatic cells_t aes_subframe_cells(input int kind, input logic [15:0] audio,
                                               input logic [3:0] vucp, inout logic level);
    cells_t     c;
    logic [7:0] pre;
    logic [27:0] b;
    int         n;
    case (kind)
      1: pre = 8'b11101000;
      2: pre = 8'b11100010;
      default: pre = 8'b11100100;
    endcase
    if (level) pre = ~pre;
    for (int i = 0; i < 8; i++) c[63-i] = pre[7-i];
    level = pre[0];
    b = subframe_bits(audio, vucp);
    n = 8;
    for (int i = 27; i >= 0; i--) begin
      level = ~level;
      c[63-n] = level; n++;
      if (b[i]) level = ~level;
      c[63-n] = level; n++;
    end
    return c;
  endfunction

  // Returns 1 when the cells form a valid subframe; kind, audio and vucp out.
  function automatic logic decode_subframe_cells(input cells_t c, input logic level_before,
                                                 output int kind, output logic [15:0] audio,
                                                 output logic [3:0] vucp);
    logic [7:0]  pre;
    logic [27:0] b;
    logic        ok, lv;
    ok = 1'b1;
    pre = c[63:56];
    if (pre[7] == level_before) ok = 1'b0;   // preamble must start with a change
    if (!pre[7]) pre = ~pre;
    case (pre)
      8'b11101000: kind = 1;
      8'b11100010: kind = 2;
      8'b11100100: kind = 3;
      default: begin kind = 0; ok = 1'b0; end
    endcase
    lv = c[56];
    for (int i = 0; i < 28; i++) begin
      logic a0, a1;
      a0 = c[55 - 2*i];
      a1 = c[54 - 2*i];
      if (a0 == lv) ok = 1'b0;               // doublet must start with a change
      b[27-i] = a0 ^ a1;
      lv = a1;
    end
    audio = b[19:4];
    vucp  = b[3:0];
    if (b[27:20] != 8'd0) ok = 1'b0;
    return ok;
  endfunction

endpackage
