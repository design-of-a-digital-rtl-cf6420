// tb_daio_rx_buffer: receive double buffer. Loads random words, reads them
// back in 32-bit and in 16-bit mode (left and right halves), and checks that
// full is set by a load, cleared only after every half is read, and that a
// load into a full buffer overwrites it and reports overflow.
module tb_daio_rx_buffer;
  import daio_pkg::*;
  logic clk = 0, rst = 1, load = 0, rd = 0, rd_half = 0, mode32 = 1;
  logic [2:0] rd_idx = 0;
  word_t [BUF_FRAMES-1:0] rxdata;
  word_t rxctrl, rd_data;
  logic full, overflow;
  word_t [BUF_WORDS-1:0] model;
  int checks = 0, failures = 0, ovf = 0;

  daio_rx_buffer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (overflow) ovf++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", msg); end
  endtask

  task automatic do_load();
    @(negedge clk);
    foreach (rxdata[i]) rxdata[i] = $urandom;
    rxctrl = $urandom;
    model = {rxctrl, rxdata};
    load = 1;
    @(negedge clk);
    load = 0;
  endtask

  task automatic read(input int idx, input bit h, input word_t exp);
    @(negedge clk);
    rd = 1; rd_idx = 3'(idx); rd_half = h;
    #1;
    check(rd_data == exp, $sformatf("read %0d/%0d: %h expected %h", idx, h, rd_data, exp));
    @(negedge clk);
    rd = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    check(!full, "full after reset");
    for (int round = 0; round < 6; round++) begin
      mode32 = round % 2;
      do_load();
      check(full, "not full after load");
      // read every word (or half), in a shuffled order; full must stay until the last
      for (int k = 0; k < BUF_WORDS; k++) begin
        int w;
        w = (k * 3 + round) % BUF_WORDS;
        if (mode32) read(w, 0, model[w]);
        else begin
          read(w, 0, {16'd0, model[w][31:16]});
          if (k == BUF_WORDS - 1) check(full, "emptied before last half");
          read(w, 1, {16'd0, model[w][15:0]});
        end
        if (k < BUF_WORDS - 1) check(full, "emptied early");
      end
      @(negedge clk);
      check(!full, "not emptied after all reads");
    end
    // overflow: two loads without reading
    do_load();
    do_load();
    @(negedge clk);
    check(ovf == 1, $sformatf("overflow count %0d", ovf));
    mode32 = 1;
    read(2, 0, model[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
