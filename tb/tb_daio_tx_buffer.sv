// tb_daio_tx_buffer: transmit buffer. Fills it with whole words and with
// 16-bit halves, checks full only after the last piece, the words handed
// over on xfer, zeros when the buffer is not full, and that xfer starts a
// new collection.
module tb_daio_tx_buffer;
  import daio_pkg::*;
  logic clk = 0, rst = 1, wr = 0, wr_half = 0, mode32 = 1, xfer = 0;
  logic [2:0] wr_idx = 0;
  word_t wr_data = 0;
  word_t [BUF_WORDS-1:0] out_words, model;
  logic full;
  int checks = 0, failures = 0;

  daio_tx_buffer dut (.*);
  always #5 clk = ~clk;

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

  task automatic write(input int idx, input bit h, input word_t d);
    @(negedge clk);
    wr = 1; wr_idx = 3'(idx); wr_half = h; wr_data = d;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic do_xfer();
    @(negedge clk);
    xfer = 1;
    @(negedge clk);
    xfer = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int round = 0; round < 6; round++) begin
      mode32 = round % 2;
      for (int k = 0; k < BUF_WORDS; k++) begin
        int w;
        word_t d;
        w = (k * 2 + round) % BUF_WORDS;
        d = $urandom;
        model[w] = d;
        if (mode32) write(w, 0, d);
        else begin
          write(w, 1, {16'd0, d[15:0]});
          check(!full, "full before last half");
          write(w, 0, {16'd0, d[31:16]});
        end
        if (k < BUF_WORDS - 1) check(!full, "full early");
      end
      check(full, "not full after all writes");
      check(out_words == model, "handed-over words differ");
      do_xfer();
      check(!full, "still full after xfer");
      check(out_words == '0, "not zero when empty");
    end
    // partly written buffer hands over zeros
    write(0, 0, 32'h1234_5678);
    check(!full && out_words == '0, "partial buffer not zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
