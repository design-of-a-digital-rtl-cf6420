// daio_mode_ctrl: direction and clock selection of the DAIO.
//
// From the enable and clock-select fields of RXMODE and TXMODE it derives
// run_receive, run_transmit and the chip clock clk_sel, one of the four
// crystal inputs XTAL10..XTAL13. Transmit's clock choice wins when both
// directions are enabled (both must then use the same clock); with neither
// enabled, and during reset, XTAL10 is selected. ERROR is raised when error
// interrupts are enabled in RXMODE and any of the four RXSTAT error flags
// (bits 26..29) is set. All of this follows the published top-level process
// of the chip. The logic is purely combinational, as in that process, so a
// change of clock can produce a short pulse on clk_sel; the clock mux itself
// is not glitch-free.
module daio_mode_ctrl (
  input  logic       reset,
  input  logic [3:0] xtal,        // XTAL10..XTAL13
  input  logic       rx_en,       // RXMODE[4]
  input  logic [1:0] rx_clk,      // RXMODE[1:0]
  input  logic       rx_errie,    // RXMODE[5]
  input  logic       tx_en,       // TXMODE[4]
  input  logic [1:0] tx_clk,      // TXMODE[1:0]
  input  logic [3:0] rx_errors,   // RXSTAT[29:26]
  output logic [1:0] clk_idx,     // index of the selected crystal
  output logic       clk_sel,
  output logic       run_receive,
  output logic       run_transmit,
  output logic       error
);

  always_comb begin
    run_receive  = 1'b0;
    run_transmit = 1'b0;
    error        = 1'b0;
    clk_idx      = 2'd0;
    if (!reset) begin
      if (rx_en) begin
        run_receive = 1'b1;
        clk_idx     = rx_clk;
      end
      if (tx_en) begin
        run_transmit = 1'b1;
        clk_idx      = tx_clk;
      end
      error = rx_errie && (|rx_errors);
    end
  end

  assign clk_sel = xtal[clk_idx];

endmodule
