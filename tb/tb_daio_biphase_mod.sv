// tb_daio_biphase_mod: the coding example of the AES description (source
// 0-1-1-0-1-0 gives 00 10 10 11 01 00 after a high line, 11 01 01 00 10 11
// after a low one), tracking of a header level, then random bits checked
// against the coding rule.
module tb_daio_biphase_mod;
  logic clk = 0, rst = 1, cell_en = 0, half = 0, bit_in = 0, track = 0, track_val = 0;
  logic cell_out, level;
  int checks = 0, failures = 0;

  daio_biphase_mod dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_level(input logic v);
    @(negedge clk);
    track = 1; track_val = v; cell_en = 1;
    @(negedge clk);
    track = 0; cell_en = 0;
    checks++;
    if (level !== v) begin failures++; $display("tracking failed"); end
  endtask

  task automatic code(input logic [5:0] bits, input logic [11:0] exp);
    for (int i = 5; i >= 0; i--)
      for (int h = 0; h < 2; h++) begin
        @(negedge clk);
        half = h; bit_in = bits[i]; cell_en = 1;
        #1;
        checks++;
        if (cell_out !== exp[2*i + 1 - h]) begin
          failures++; $display("bit %0d half %0d: %b", i, h, cell_out);
        end
      end
    @(negedge clk);
    cell_en = 0;
  endtask

  initial begin
    logic lv;
    repeat (3) @(posedge clk);
    rst = 0;
    set_level(1);
    code(6'b011010, 12'b00_10_10_11_01_00);
    set_level(0);
    code(6'b011010, 12'b11_01_01_00_10_11);
    // random bits: first cell changes level, second changes again for a 1
    lv = level;
    for (int i = 0; i < 500; i++) begin
      logic b, c0;
      b = $urandom;
      @(negedge clk);
      half = 0; bit_in = b; cell_en = 1;
      #1;
      c0 = cell_out;
      checks++;
      if (c0 == lv) failures++;
      @(negedge clk);
      half = 1;
      #1;
      checks++;
      if (cell_out != (c0 ^ b)) failures++;
      lv = cell_out;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
