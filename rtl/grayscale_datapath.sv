// grayscale_datapath: multiplier-free RGB to grayscale conversion.
//
// Gray = 0.299 R + 0.587 G + 0.114 B is approximated by hard-wired shifts and
// additions instead of three 8x8 multipliers:
//   R term: (R>>2) + (R>>5) + (R>>6)            = 0.296875 R   (from the document)
//   G term: (G>>1) + (G>>4) + (G>>6) + (G>>7)   = 0.5859375 G  (this design's choice)
//   B term: (B>>4) + (B>>5) + (B>>6)            = 0.109375 B   (this design's choice)
// Every shifted value is truncated, so the result can fall a little below the
// exact product sum; the coefficients add up to 0.9921875, so the sum always
// fits in 8 bits (at most 244).
//
// Pipeline: stage 1 forms the three per-channel terms with 8-bit adders and
// registers them; stage 2 adds the three terms (9-bit adder) and registers the
// gray value. Latency is two clock cycles, throughput one pixel per cycle.
// in_valid travels alongside the data as out_valid. Synchronous active-high
// reset clears the valid bits only.
module grayscale_datapath
  import gray_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  rgb_t       in_pix,
  output logic       out_valid,
  output logic [7:0] out_gray
);

  logic [7:0] r_term, g_term, b_term;
  logic [7:0] r_q, g_q, b_q;
  logic       v1_q;
  logic [8:0] sum;

  always_comb begin
    r_term = (in_pix.r >> 2) + (in_pix.r >> 5) + (in_pix.r >> 6);
    g_term = (in_pix.g >> 1) + (in_pix.g >> 4) + (in_pix.g >> 6) + (in_pix.g >> 7);
    b_term = (in_pix.b >> 4) + (in_pix.b >> 5) + (in_pix.b >> 6);
  end

  // Stage 1 registers.
  always_ff @(posedge clk) begin
    if (rst) v1_q <= 1'b0;
    else     v1_q <= in_valid;
    r_q <= r_term;
    g_q <= g_term;
    b_q <= b_term;
  end

  assign sum = {1'b0, r_q} + {1'b0, g_q} + {1'b0, b_q};

  // Stage 2 registers.
  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= v1_q;
    out_gray <= sum[7:0];
  end

  // The coefficient sum is below one, so the 9th bit is never set.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) v1_q |-> !sum[8]);

endmodule
