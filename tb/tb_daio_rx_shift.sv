// tb_daio_rx_shift: random shift/clear sequence against a queue model of the
// last 20 received bits (first received ends in the top bit).
module tb_daio_rx_shift;
  import daio_pkg::*;
  logic clk = 0, rst = 1, clear = 0, shift = 0, din = 0;
  logic [SR_BITS-1:0] q, model;
  int checks = 0, failures = 0;

  daio_rx_shift dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      shift = ($urandom % 3) != 0;
      din   = $urandom;
      clear = ($urandom % 200) == 0;
      @(posedge clk);
      if (clear) model = '0;
      else if (shift) model = {model[SR_BITS-2:0], din};
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("i=%0d q=%h model=%h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
