// daio_phase_decoder: biphase-mark receiver of the DAIO.
//
// The DI input is sampled on every core clock, ten samples per source bit
// (640 samples per frame). A window of ten samples starts at a transition;
// a 4-bit up/down counter adds one for a high sample and subtracts one for a
// low one. After the window a doublet without a middle transition leaves the
// counter at +10 or -10 (10 or 6 modulo 16) and decodes as 0; one with a
// middle transition leaves it near 0 and decodes as 1. Values 6..10 decide 0,
// everything else 1, which stays correct with up to two wrong or shifted
// samples and for windows of 8 or 9 samples.
//
// Window alignment (this design's choice of the details): the next window
// starts at a transition seen up to two samples early or late around the
// expected bit boundary. If none is seen the boundary is a biphase violation
// and the window runs on at the expected position. Every preamble begins with
// three equal cells (a run of about 15 samples, longer than any run in coded
// data; runs over RUN_MAX samples are an idle line and ignored), and the transition that ends the run lies in the middle of the second
// doublet; the decoder re-aligns its window there, which also gives the
// initial lock. Preambles 1 and 2 hold a second such run, 3 or 5 cells
// later, that ends on a bit boundary; a long run ending less than 40 samples
// after the previous one is taken as that second run and, if the window is
// not already at a boundary, the window is restarted there.
//
// For each source bit, bit_valid pulses for one clock with bit_val and
// bit_viol (no transition at the end of this bit). The boundary is decided up
// to three samples after the window, so bit_valid comes 1..3 samples after
// the bit's last sample. The last four bits and violation flags are compared
// with the three preamble patterns; on a match pre_valid pulses together with
// bit_valid of the fourth preamble bit and pre_type names the preamble.
// The input passes a two-stage synchronizer first.
module daio_phase_decoder import daio_pkg::*; #(
  parameter int unsigned TOL      = 2,    // boundary tolerance, samples
  parameter int unsigned RUN_SYNC = 13,   // shortest run that marks a preamble
  parameter int unsigned RUN_MAX  = 18    // longest one (longer: idle line)
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  input  logic      din,
  output logic      bit_valid,
  output logic      bit_val,
  output logic      bit_viol,
  output logic      pre_valid,
  output preamble_t pre_type,
  output logic      locked
);

  logic [1:0] sync;
  logic       s, prev, trans, pending, held;
  logic [3:0] pos, acc, step;
  logic [4:0] run;
  logic [3:0] hist_b, hist_v;
  logic [5:0] since_long;                 // samples since the last long run ended
  logic       long_end, first_run, second_run;

  // Edges are taken from a 3-sample majority of the input, so a one-sample
  // spike moves no window and splits no preamble run. The majority lags the
  // input by one sample, so the counter adds the input delayed by one sample
  // (prev) and both stay aligned.
  logic prev2, maj, fprev;
  assign maj   = (s & prev) | (s & prev2) | (prev & prev2);
  assign trans = maj ^ fprev;

  assign long_end   = trans && (run >= RUN_SYNC[4:0]) && (run <= RUN_MAX[4:0]);
  assign first_run  = long_end && (since_long >= 6'd40);
  assign second_run = long_end && (since_long < 6'd40);

  assign s     = sync[1];
  assign step  = prev ? 4'd1 : 4'd15;

  // 4-bit window count -> source bit
  function automatic logic decide(input logic [3:0] a);
    return !(a >= 4'd6 && a <= 4'd10);
  endfunction

  // Preamble patterns over the last four bits, oldest in bit 3
  function automatic preamble_t match(input logic [3:0] b, input logic [3:0] v);
    if (b == 4'b0110 && v == 4'b1010) return PRE_BLOCK;
    if (b == 4'b0101 && v == 4'b1100) return PRE_A;
    if (b == 4'b0110 && v == 4'b1100) return PRE_B;
    return PRE_NONE;
  endfunction

  logic      emit, emit_b, emit_v;
  logic [3:0] nb, nv;

  always_comb begin
    emit   = 1'b0;
    emit_b = held;
    emit_v = 1'b0;
    if (en && locked && !first_run) begin
      if (pending && trans) begin
        emit = 1'b1;
      end else if (pending && pos == TOL[3:0]) begin
        emit   = 1'b1;
        emit_v = 1'b1;
      end else if (!pending && trans && pos >= 4'(SAMPLES_PER_BIT - TOL)) begin
        emit   = 1'b1;
        emit_b = decide(acc);
      end
    end
    nb = {hist_b[2:0], emit_b};
    nv = {hist_v[2:0], emit_v};
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sync      <= '0;
      prev      <= 1'b0;
      run       <= '0;
      prev2     <= 1'b0;
      fprev     <= 1'b0;
      since_long <= 6'd63;
      pos       <= '0;
      acc       <= '0;
      pending   <= 1'b0;
      held      <= 1'b0;
      locked    <= 1'b0;
      hist_b    <= '0;
      hist_v    <= '0;
      bit_valid <= 1'b0;
      bit_val   <= 1'b0;
      bit_viol  <= 1'b0;
      pre_valid <= 1'b0;
      pre_type  <= PRE_NONE;
    end else begin
      sync      <= {sync[0], din};
      prev      <= s;
      prev2     <= prev;
      fprev     <= maj;
      run       <= trans ? 5'd1 : (run == 5'd31 ? run : run + 5'd1);
      since_long <= !en ? 6'd63 : long_end ? 6'd0 : (since_long == 6'd63 ? since_long : since_long + 6'd1);
      bit_valid <= emit;
      pre_valid <= 1'b0;
      if (emit) begin
        bit_val   <= emit_b;
        bit_viol  <= emit_v;
        hist_b    <= nb;
        hist_v    <= nv;
        pre_type  <= match(nb, nv);
        pre_valid <= (match(nb, nv) != PRE_NONE);
      end
      if (!en) begin
        locked  <= 1'b0;
        pending <= 1'b0;
        hist_v  <= '0;
      end else if (!locked) begin
        if (trans) begin
          locked  <= 1'b1;
          pos     <= 4'd1;
          acc     <= step;
          pending <= 1'b0;
        end
      end else if (first_run) begin
        // end of the opening run of a preamble: this is sample 5 of doublet 2,
        // whose first five samples had level fprev
        pos     <= 4'd6;
        acc     <= (fprev ? 4'd5 : 4'd11) + step;
        pending <= 1'b0;
      end else if (second_run && !pending && pos < 4'(SAMPLES_PER_BIT - TOL)) begin
        // second run of preamble 1 or 2 ends on a boundary the window missed
        pos     <= 4'd1;
        acc     <= step;
      end else if (pending && trans) begin
        pending <= 1'b0;
        pos     <= 4'd1;
        acc     <= step;
      end else if (pending && pos == TOL[3:0]) begin
        pending <= 1'b0;
        pos     <= pos + 4'd1;
        acc     <= acc + step;
      end else if (!pending && trans && pos >= 4'(SAMPLES_PER_BIT - TOL)) begin
        pos <= 4'd1;
        acc <= step;
      end else if (pos == 4'(SAMPLES_PER_BIT - 1)) begin
        held    <= decide(acc + step);
        pending <= 1'b1;
        pos     <= '0;
        acc     <= '0;
      end else begin
        pos <= pos + 4'd1;
        acc <= acc + step;
      end
    end
  end

endmodule
