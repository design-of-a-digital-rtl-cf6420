// tb_daio_tx_control: transmitter from buffer words to DO cells.
//
// A buffer model supplies four random frames at every xfer (one buffer is
// left unfilled to force an underrun). DO is sampled once per cell and cut
// into 64-cell subframes, which the reference decoder checks: valid
// biphase-mark coding with a level change at every bit and preamble start,
// preamble 1 on frame 0 of each 192-frame block, 2 on other A subframes and
// 3 on B subframes, audio and V/U/C/P as written (zeros after the underrun).
// Also checked: one cell per 5 clocks (320 clocks per subframe), xfer every
// eighth subframe, the first cell 5 clocks after enable, frame_count, and
// DO held low after transmit is disabled.
module tb_daio_tx_control;
  import daio_pkg::*;
  import daio_tb_pkg::*;

  localparam int NSUB = 2*FRAMES_PER_BLOCK + 24;   // one block and 12 frames
  localparam int UNDERRUN_BUF = 5;

  logic clk = 0, rst = 1, en = 0, buf_full = 0;
  word_t [BUF_WORDS-1:0] buf_words = '0;
  logic xfer, underrun, dout, cell_en;
  logic [7:0] frame_count;
  logic [2:0] sub_idx;
  int checks = 0, failures = 0;

  word_t [BUF_WORDS-1:0] sent[$];
  logic cells[$];
  int nxfer = 0, nunder = 0;
  longint cyc = 0, en_cyc = 0, first_cell_cyc = -1;
  logic cell_d = 0;

  daio_tx_control dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL at %0d: %s", cyc, msg); end
  endtask

  function automatic word_t [BUF_WORDS-1:0] random_buf();
    word_t [BUF_WORDS-1:0] w;
    foreach (w[i]) w[i] = $urandom;
    return w;
  endfunction

  // buffer model: hands out the current words at xfer, then prepares new ones
  always @(posedge clk) begin
    cyc++;
    cell_d <= cell_en;
    if (cell_d && en) begin
      cells.push_back(dout);
      if (first_cell_cyc < 0) first_cell_cyc = cyc;
    end
    if (underrun && !rst) nunder++;
    if (xfer && !rst) begin
      nxfer++;
      sent.push_back(buf_full ? buf_words : '0);
      buf_words <= random_buf();
      buf_full  <= (nxfer != UNDERRUN_BUF);
    end
  end

  initial begin
    logic lv;
    int kind, nsub;
    logic [15:0] a;
    logic [3:0] vucp;
    buf_words = random_buf();
    buf_full = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    en = 1;
    en_cyc = cyc;
    wait (cells.size() == 64*NSUB);
    @(negedge clk);
    // en is seen at edge en_cyc+1; DO changes CLKS_PER_CELL edges later and is logged one edge after that
    check(first_cell_cyc - en_cyc == longint'(CLKS_PER_CELL + 2), $sformatf("first cell after %0d clocks", first_cell_cyc - en_cyc));
    check(cyc - first_cell_cyc >= 320*NSUB - 330 && cyc - first_cell_cyc <= 320*NSUB, "cell rate");
    check(nxfer == (NSUB + 7)/8 || nxfer == NSUB/8 + 1, $sformatf("%0d transfers", nxfer));
    check(nunder == 1, $sformatf("%0d underruns", nunder));
    check(frame_count == 8'((NSUB/2) % FRAMES_PER_BLOCK) || frame_count == 8'((NSUB/2 - 1) % FRAMES_PER_BLOCK),
          $sformatf("frame_count %0d", frame_count));
    lv = 0;
    nsub = 0;
    for (int j = 0; j < NSUB; j++) begin
      cells_t c;
      word_t [BUF_WORDS-1:0] w;
      int s, ekind;
      logic [3:0] evucp;
      logic [15:0] ea;
      for (int i = 0; i < 64; i++) c[63-i] = cells[64*j + i];
      w = sent[j/8];
      s = j % 8;
      ea = (s % 2 == 1) ? w[s/2][15:0] : w[s/2][31:16];
      evucp = {w[4][31-s], w[4][23-s], w[4][15-s], w[4][7-s]};
      ekind = (s % 2 == 1) ? 3 : (((j/2) % FRAMES_PER_BLOCK == 0) ? 1 : 2);
      checks++;
      if (!decode_subframe_cells(c, lv, kind, a, vucp) || kind != ekind || a != ea || vucp != evucp) begin
        failures++;
        if (failures < 15) $display("subframe %0d: kind %0d/%0d audio %h/%h vucp %b/%b", j, kind, ekind, a, ea, vucp, evucp);
      end
      lv = c[0];
      nsub++;
    end
    // disable: DO goes low and stays there
    @(negedge clk);
    en = 0;
    repeat (50) begin
      @(negedge clk);
      checks++;
      if (dout !== 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
