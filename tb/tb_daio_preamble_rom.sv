// tb_daio_preamble_rom: the six headers against the preamble cell patterns
// of the AES format (11101000, 11100010, 11100100 and complements), and the
// 8 trailing zero bits checked as valid biphase-mark zeros that start with a
// level change and end on the level the header was entered from.
module tb_daio_preamble_rom;
  import daio_pkg::*;
  preamble_t kind;
  logic start_one;
  logic [23:0] cells;
  int checks = 0, failures = 0;

  daio_preamble_rom dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] pre;
    logic lv;
    for (int k = 1; k < 4; k++) begin
      for (int p = 0; p < 2; p++) begin
        kind = preamble_t'(k);
        start_one = p;
        #1;
        pre = (k == 1) ? 8'hE8 : (k == 2) ? 8'hE2 : 8'hE4;
        if (!start_one) pre = ~pre;
        checks++;
        if (cells[23:16] !== pre) begin failures++; $display("preamble %0d/%0d: %b", k, p, cells[23:16]); end
        lv = cells[16];
        for (int b = 0; b < 8; b++) begin
          checks++;
          if (cells[15-2*b] == lv || cells[14-2*b] != cells[15-2*b]) begin
            failures++; $display("zero bit %0d of header %0d/%0d not coded", b, k, p);
          end
          lv = cells[14-2*b];
        end
        checks++;
        if (cells[0] != !start_one) begin failures++; $display("header %0d/%0d ends on wrong level", k, p); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
