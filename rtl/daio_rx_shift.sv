// daio_rx_shift: 20-bit receive shift register.
//
// Every recovered source bit (shift strobe) enters at bit 0 and the contents
// move one place up; the bit leaving bit 19 is dropped. After the last bit of
// a subframe the register holds the 16 audio bits in q[19:4] (first received,
// the MSB, in q[19]) and V, U, C, P in q[3:0]. Width and the discarding of
// surplus bits follow the chip description; the synchronous clear when the
// receiver is disabled is this design's choice. One clock per shift.
module daio_rx_shift import daio_pkg::*; #(
  parameter int unsigned WIDTH = SR_BITS
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             shift,
  input  logic             din,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        q <= '0;
    else if (clear) q <= '0;
    else if (shift) q <= {q[WIDTH-2:0], din};
  end

endmodule
