// tb_daio_rx_load: loads eight random subframes in random order and checks
// the audio halves of RXDATA and the grouped V/U/C/P bits of RXCTRL against
// a model of the register layout.
module tb_daio_rx_load;
  import daio_pkg::*;
  logic clk = 0, rst = 1, load = 0;
  logic [2:0] sub_idx = 0;
  logic [SR_BITS-1:0] sr = 0;
  word_t [BUF_FRAMES-1:0] rxdata, mdata;
  word_t rxctrl, mctrl;
  int checks = 0, failures = 0;

  daio_rx_load dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mdata = '0; mctrl = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      load = $urandom % 2;
      sub_idx = $urandom;
      sr = $urandom;
      @(posedge clk);
      if (load) begin
        if (sub_idx % 2 == 1) mdata[sub_idx/2][15:0] = sr[19:4];
        else mdata[sub_idx/2][31:16] = sr[19:4];
        mctrl[31 - sub_idx] = sr[3];
        mctrl[23 - sub_idx] = sr[2];
        mctrl[15 - sub_idx] = sr[1];
        mctrl[7 - sub_idx]  = sr[0];
      end
      #1;
      checks++;
      if (rxdata !== mdata || rxctrl !== mctrl) begin
        failures++;
        if (failures < 10) $display("i=%0d data %h/%h ctrl %h/%h", i, rxdata, mdata, rxctrl, mctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
