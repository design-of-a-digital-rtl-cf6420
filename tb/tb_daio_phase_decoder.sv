// tb_daio_phase_decoder: AES line samples in, source bits and preambles out.
//
// The stimulus is built from the reference encoder: subframes with random
// audio and correct parity, 5 samples per cell (10 per source bit). Part 1
// starts cleanly and disturbs every edge by up to one sample of jitter; a
// second run puts one-sample spikes into the middle of some cells; every bit, violation flag and
// preamble after the first start-of-block must match the reference, and the
// bit rate must be one bit per 10 samples. Part 2 disables the decoder,
// starts it in the middle of random data and requires it to find the
// preamble structure within two subframes and then decode exactly.
module tb_daio_phase_decoder;
  import daio_pkg::*;
  import daio_tb_pkg::*;

  logic clk = 0, rst = 1, en = 0, din = 0;
  logic bit_valid, bit_val, bit_viol, pre_valid, locked;
  preamble_t pre_type;
  int checks = 0, failures = 0;

  daio_phase_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decoder output log
  typedef struct packed { logic b; logic v; logic p; logic [1:0] t; } ev_t;
  ev_t got[$];
  longint bit_times[$];
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (bit_valid) begin
      got.push_back('{b: bit_val, v: bit_viol, p: pre_valid, t: pre_type});
      bit_times.push_back(cyc);
    end
  end

  // reference bits for a subframe
  task automatic ref_events(input int kind, input logic [15:0] a, input logic [3:0] vucp, ref ev_t q[$]);
    logic [3:0] pb, pv;
    logic [27:0] b;
    case (kind)
      1: begin pb = 4'b0110; pv = 4'b1010; end
      2: begin pb = 4'b0101; pv = 4'b1100; end
      default: begin pb = 4'b0110; pv = 4'b1100; end
    endcase
    for (int i = 3; i >= 0; i--)
      q.push_back('{b: pb[i], v: pv[i], p: (i == 0), t: (i == 0) ? 2'(kind) : 2'd0});
    b = subframe_bits(a, vucp);
    for (int i = 27; i >= 0; i--) q.push_back('{b: b[i], v: 1'b0, p: 1'b0, t: 2'd0});
  endtask

  // build samples for n subframes starting with a block start
  task automatic build(input int n, input bit jitter, input bit spikes, ref logic smp[$], ref ev_t exp[$]);
    logic level = 0;
    logic cells[$];
    for (int s = 0; s < n; s++) begin
      int kind;
      logic [15:0] a;
      logic [3:0] vucp;
      cells_t c;
      kind = (s % 2 == 1) ? 3 : ((s == 0) ? 1 : 2);
      a = $urandom;
      vucp[3:1] = $urandom;
      vucp[0] = parity_bit(a, vucp[3:1]);
      c = aes_subframe_cells(kind, a, vucp, level);
      for (int i = 63; i >= 0; i--) cells.push_back(c[i]);
      ref_events(kind, a, vucp, exp);
    end
    cells.push_back(~level);   // closing edge
    foreach (cells[i]) for (int k = 0; k < 5; k++) smp.push_back(cells[i]);
    if (jitter || spikes) begin
      for (int i = 5; i < smp.size() - 5; i += 5) begin
        if (jitter && smp[i] != smp[i-1]) begin
          case ($urandom % 3)
            1: smp[i] = smp[i-1];       // edge late by one sample
            2: smp[i-1] = smp[i];       // edge early by one sample
            default: ;
          endcase
        end
        // one-sample spike in the middle of a cell
        if (spikes && ($urandom % 6) == 0) smp[i+2] = ~smp[i+2];
      end
    end
  endtask

  task automatic play(ref logic smp[$]);
    foreach (smp[i]) begin
      @(negedge clk);
      din = smp[i];
    end
    repeat (10) @(negedge clk);
  endtask

  task automatic compare(input int skip_max, ref ev_t exp[$]);
    int p, k, n;
    p = -1;
    foreach (got[i]) if (got[i].p && p < 0) p = i;
    checks++;
    if (p < 0) begin failures++; $display("no preamble found"); return; end
    k = (got[p].t == 2'(PRE_BLOCK)) ? 0 : 1;
    checks++;
    if (k > skip_max || (k == 1 && got[p].t != 2'(PRE_B))) begin
      failures++; $display("first preamble type %0d not expected", got[p].t);
      return;
    end
    n = 0;
    for (int i = p, j = 32*k + 3; i < got.size() && j < exp.size(); i++, j++) begin
      checks++; n++;
      if (got[i] !== exp[j]) begin
        failures++;
        if (failures < 10) $display("event %0d: got %p exp %p", j, got[i], exp[j]);
      end
    end
    checks++;
    if (n < exp.size() - 32*(k+1)) begin failures++; $display("too few bits: %0d", n); end
  endtask

  initial begin
    logic smp[$];
    ev_t exp[$];
    longint span;
    repeat (3) @(posedge clk);
    rst = 0;
    en = 1;
    // part 1: clean start, jitter and spikes
    build(24, 1, 0, smp, exp);
    play(smp);
    compare(0, exp);
    // rate: 10 samples per bit on average
    span = bit_times[bit_times.size()-1] - bit_times[0];
    checks++;
    if (span < 10*(got.size()-1) - 12 || span > 10*(got.size()-1) + 12) begin
      failures++; $display("bit rate wrong: %0d clocks for %0d bits", span, got.size()-1);
    end
    // part 1b: spikes, no jitter
    en = 0;
    repeat (5) @(negedge clk);
    din = 0;
    repeat (5) @(negedge clk);
    got.delete(); bit_times.delete(); smp.delete(); exp.delete();
    en = 1;
    build(24, 0, 1, smp, exp);
    play(smp);
    compare(0, exp);
    // part 2: restart in the middle of data
    en = 0;
    repeat (5) @(negedge clk);
    got.delete(); bit_times.delete(); smp.delete(); exp.delete();
    en = 1;
    for (int i = 0; i < 137; i++) smp.push_back(((i / 5) % 3) == 1);
    begin
      logic s2[$];
      build(12, 0, 0, s2, exp);
      if (smp[smp.size()-1] == 1'b1) foreach (s2[i]) s2[i] = ~s2[i];   // first preamble must start with a change
      foreach (s2[i]) smp.push_back(s2[i]);
    end
    play(smp);
    compare(1, exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
