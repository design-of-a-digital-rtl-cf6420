// tb_daio_mode_ctrl: exhaustive check of direction/clock selection.
// Four crystals run at different periods; for every combination of reset,
// enables, clock fields, error-interrupt enable and error flags the outputs
// are compared with a reference written from the selection rules (transmit
// choice wins, XTAL10 by default, ERROR only with the interrupt enabled).
module tb_daio_mode_ctrl;
  logic       reset, rx_en, tx_en, rx_errie;
  logic [1:0] rx_clk, tx_clk, clk_idx;
  logic [3:0] xtal, rx_errors;
  logic       clk_sel, run_receive, run_transmit, error;
  int checks = 0, failures = 0;

  daio_mode_ctrl dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp_idx;
    xtal = 4'b0000;
    for (int v = 0; v < 2**11; v++) begin
      {reset, rx_en, tx_en, rx_errie, rx_clk, tx_clk} = 8'(v >> 3);
      rx_errors = 4'(1 << (v % 5)) & 4'hF;   // none or one flag
      for (int t = 0; t < 8; t++) begin
        xtal[0] = t[0]; xtal[1] = t[1]; xtal[2] = t[2]; xtal[3] = ^t[2:0];
        #1;
        exp_idx = reset ? 2'd0 : (tx_en ? tx_clk : (rx_en ? rx_clk : 2'd0));
        checks++;
        if (clk_idx !== exp_idx || clk_sel !== xtal[exp_idx] ||
            run_receive !== (!reset && rx_en) || run_transmit !== (!reset && tx_en) ||
            error !== (!reset && rx_errie && rx_errors != 0)) begin
          failures++;
          if (failures < 10) $display("mismatch v=%0d t=%0d idx=%0d exp=%0d", v, t, clk_idx, exp_idx);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
