// result_packer: gathers four consecutive 8-bit grayscale results into one
// 32-bit SRAM word, so that one write stores four pixels.
//
// Result number i of a group (i = 0..3, in arrival order) goes to byte i of
// the word. When the fourth result of a group arrives the word is copied to
// the output register and `pending` rises; it stays high until the controller
// takes the word with `take` (the cycle the write is issued). A new group can
// be collected while the previous word waits. `clear` restarts the byte count
// and drops a pending word, used at the start of a run. Taking a word and
// completing the next one in the same cycle leaves the new one pending.
//
// The document states that the results of four pixels are written together;
// the byte order and the take/pending handshake are this design's choices.
module result_packer
  import gray_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic              in_valid,
  input  logic [PIX_W-1:0]  in_gray,
  input  logic              take,
  output logic              pending,
  output logic [DATA_W-1:0] word
);

  logic [1:0]                         idx_q;
  logic [PIX_PER_WORD-2:0][PIX_W-1:0] acc_q;   // first three results of a group
  logic                               complete;

  assign complete = in_valid && (idx_q == 2'd3);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      idx_q   <= '0;
      pending <= 1'b0;
    end else begin
      if (in_valid) idx_q <= idx_q + 2'd1;
      if (complete)  pending <= 1'b1;
      else if (take) pending <= 1'b0;
    end
    if (in_valid && idx_q != 2'd3) acc_q[idx_q] <= in_gray;
    if (complete) word <= {in_gray, acc_q[2], acc_q[1], acc_q[0]};
  end

  // A finished word must be written before the next one replaces it.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst || clear)
                                 complete && pending |-> take);
  a_take_needs_word: assert property (@(posedge clk) disable iff (rst || clear)
                                      take |-> pending);

endmodule
