// tb_daio_rx_control: receive sequencer driven with decoded-bit events.
//
// Subframes are sent as 4 preamble bits (preamble flag on the fourth) and 28
// data bits with even parity, one bit every 3 clocks. Checked: nothing loads
// before a start of block; each subframe loads exactly one clock after its
// last bit with the right buffer index; buf_load follows every eighth load;
// frame_count counts frames and wraps after 192 so that the next block's
// preamble 1 is accepted; a parity error, a violation inside the data, a
// wrong preamble type and a missing preamble are each reported, the last two
// dropping out of the block.
module tb_daio_rx_control;
  import daio_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic bit_valid = 0, bit_val = 0, bit_viol = 0, pre_valid = 0;
  preamble_t pre_type = PRE_NONE;
  logic load, buf_load, in_block, err_viol, err_parity, err_sync;
  logic [2:0] sub_idx;
  logic [7:0] frame_count;
  int checks = 0, failures = 0;
  int loads = 0, buf_loads = 0, n_viol = 0, n_par = 0, n_sync = 0;
  int exp_sub = 0;
  longint cyc = 0, last_bit_cyc = 0;

  daio_rx_control dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL at %0d: %s", cyc, msg);
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (err_viol) n_viol++;
      if (err_parity) n_par++;
      if (err_sync) n_sync++;
      if (load) begin
        loads++;
        check(cyc == last_bit_cyc + 1, "load not one clock after the last bit");
        check(sub_idx == 3'(exp_sub), $sformatf("sub_idx %0d expected %0d", sub_idx, exp_sub));
        exp_sub = (exp_sub + 1) % 8;
      end
      if (buf_load) begin
        buf_loads++;
        check(exp_sub == 0, "buf_load not after the eighth subframe");
      end
    end
  end

  task automatic send_bit(input logic b, input logic v, input preamble_t p);
    @(negedge clk);
    bit_valid = 1; bit_val = b; bit_viol = v;
    pre_valid = (p != PRE_NONE); pre_type = p;
    @(posedge clk);
    last_bit_cyc = cyc + 1;
    @(negedge clk);
    bit_valid = 0; pre_valid = 0; pre_type = PRE_NONE;
    @(negedge clk);
  endtask

  // bad: 0 good, 1 parity error, 2 violation in data, 3 no preamble flag
  task automatic send_sub(input preamble_t p, input int bad);
    logic [27:0] d;
    d = {8'd0, 16'($urandom), 3'($urandom), 1'b0};
    d[0] = ^d[27:1];
    if (bad == 1) d[0] = ~d[0];
    send_bit(0, 1, PRE_NONE);
    send_bit(1, (p == PRE_BLOCK) ? 1'b0 : 1'b1, PRE_NONE);
    send_bit((p == PRE_A) ? 1'b0 : 1'b1, (p == PRE_BLOCK) ? 1'b1 : 1'b0, PRE_NONE);
    send_bit((p == PRE_A) ? 1'b1 : 1'b0, 0, (bad == 3) ? PRE_NONE : p);
    for (int i = 27; i >= 0; i--) send_bit(d[i], (bad == 2 && i == 10), PRE_NONE);
  endtask

  initial begin
    int l0;
    repeat (3) @(posedge clk);
    rst = 0; en = 1;
    // not in a block yet: subframes A/B are ignored
    send_sub(PRE_A, 0); send_sub(PRE_B, 0);
    check(loads == 0 && !in_block, "loaded before a start of block");
    // one whole block
    for (int f = 0; f < FRAMES_PER_BLOCK; f++) begin
      send_sub(f == 0 ? PRE_BLOCK : PRE_A, 0);
      if (f == 0) check(in_block, "start of block not accepted");
      send_sub(PRE_B, 0);
      check(frame_count == 8'((f + 1) % FRAMES_PER_BLOCK), $sformatf("frame_count %0d after frame %0d", frame_count, f));
    end
    repeat (3) @(posedge clk);
    check(loads == 2*FRAMES_PER_BLOCK, $sformatf("%0d loads", loads));
    check(buf_loads == FRAMES_PER_BLOCK/4, $sformatf("%0d buffer loads", buf_loads));
    check(n_viol == 0 && n_par == 0 && n_sync == 0, "error on clean data");
    // next block starts with preamble 1; parity error and data violation
    send_sub(PRE_BLOCK, 1);
    send_sub(PRE_B, 2);
    check(n_par == 1, "parity error not reported");
    check(n_viol == 1, "violation not reported");
    check(in_block, "left the block on data errors");
    // wrong preamble type: subframe B where A is expected
    send_sub(PRE_B, 0);
    check(n_sync == 1 && !in_block, "wrong preamble not reported");
    // back in sync, then a missing preamble
    exp_sub = 0;
    send_sub(PRE_BLOCK, 0);
    l0 = loads;
    send_sub(PRE_B, 3);
    check(n_sync == 2 && !in_block, "missing preamble not reported");
    check(loads == l0, "loaded without a preamble");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
