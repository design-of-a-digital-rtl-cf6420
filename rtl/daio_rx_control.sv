// daio_rx_control: receive sequencer of the DAIO.
//
// Waits for a start-of-block preamble, then counts the 28 source bits that
// follow each preamble. On the last one it issues load (one clock after the
// bit, when the shift register holds it) with the subframe's index 0..7 in
// the 4-frame buffer. After subframe A it expects a preamble 3 (subframe B);
// after subframe B it increments frame_count and expects a preamble 2, or a
// preamble 1 once 192 frames of the block have passed. After the eighth
// subframe it pulses buf_load one clock after the final load, so the host
// buffer takes the completed RXDATA/RXCTRL words.
//
// Error pulses (this design's reading of "keeps track of data correctness"):
// err_viol for a biphase violation inside the data bits, err_parity when the
// 28 bits after the preamble do not have even parity (AES rule), err_sync when
// the expected preamble does not arrive within 4 bits of the end of a
// subframe or arrives with the wrong type. On err_sync the sequencer returns
// to waiting for a start of block, except that a start-of-block preamble
// arriving early starts the new block at once.
module daio_rx_control import daio_pkg::*; (
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  input  logic      bit_valid,
  input  logic      bit_val,
  input  logic      bit_viol,
  input  logic      pre_valid,
  input  preamble_t pre_type,
  output logic      load,
  output logic [2:0] sub_idx,
  output logic      buf_load,
  output logic [7:0] frame_count,
  output logic      in_block,
  output logic      err_viol,
  output logic      err_parity,
  output logic      err_sync
);

  typedef enum logic [1:0] {S_HUNT, S_DATA, S_WAITPRE} state_t;

  state_t     state;
  logic [4:0] cnt;
  logic       parity;
  preamble_t  expect_pre;

  localparam logic [4:0] DATA_BITS = 5'(SUBFRAME_BITS - PREAMBLE_BITS);

  assign in_block = (state != S_HUNT);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state       <= S_HUNT;
      cnt         <= '0;
      parity      <= 1'b0;
      expect_pre  <= PRE_BLOCK;
      load        <= 1'b0;
      sub_idx     <= '0;
      buf_load    <= 1'b0;
      frame_count <= '0;
      err_viol    <= 1'b0;
      err_parity  <= 1'b0;
      err_sync    <= 1'b0;
    end else begin
      load       <= 1'b0;
      buf_load   <= load && (sub_idx == 3'(BUF_SUBFRAMES - 1));
      err_viol   <= 1'b0;
      err_parity <= 1'b0;
      err_sync   <= 1'b0;
      if (load) sub_idx <= sub_idx + 3'd1;
      if (!en) begin
        state <= S_HUNT;
      end else begin
        unique case (state)
          S_HUNT: begin
            if (pre_valid && pre_type == PRE_BLOCK) begin
              state       <= S_DATA;
              cnt         <= '0;
              parity      <= 1'b0;
              sub_idx     <= '0;
              frame_count <= '0;
              expect_pre  <= PRE_B;
            end
          end
          S_DATA: begin
            if (bit_valid) begin
              cnt    <= cnt + 5'd1;
              parity <= parity ^ bit_val;
              if (bit_viol) err_viol <= 1'b1;
              if (cnt == DATA_BITS - 5'd1) begin
                load       <= 1'b1;
                err_parity <= parity ^ bit_val;
                state      <= S_WAITPRE;
                cnt        <= '0;
                if (expect_pre == PRE_B) begin
                  // subframe A done; preamble 3 next
                end else begin
                  // subframe B done: one more frame
                  frame_count <= (frame_count == 8'(FRAMES_PER_BLOCK - 1)) ? 8'd0 : frame_count + 8'd1;
                end
              end
            end
          end
          S_WAITPRE: begin
            if (bit_valid) begin
              cnt <= cnt + 5'd1;
              if (pre_valid && pre_type == expect_pre) begin
                state      <= S_DATA;
                cnt        <= '0;
                parity     <= 1'b0;
                expect_pre <= (expect_pre == PRE_B)
                              ? ((frame_count == 8'(FRAMES_PER_BLOCK - 1)) ? PRE_BLOCK : PRE_A) : PRE_B;
              end else if (pre_valid && pre_type == PRE_BLOCK) begin
                err_sync    <= 1'b1;
                state       <= S_DATA;
                cnt         <= '0;
                parity      <= 1'b0;
                sub_idx     <= '0;
                frame_count <= '0;
                expect_pre  <= PRE_B;
              end else if (pre_valid || cnt == 5'(PREAMBLE_BITS - 1)) begin
                err_sync <= 1'b1;
                state    <= S_HUNT;
              end
            end
          end
          default: state <= S_HUNT;
        endcase
      end
    end
  end

endmodule
