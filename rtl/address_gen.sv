// address_gen: SRAM word addresses for the grayscale access sequence.
//
// Two enabled counters run through the job: the read counter counts pixels
// (one input word each), the write counter counts result words (four pixels
// each). The read address is the read count, so pixels are read from word 0
// upward. The write address is the write count plus a base: WR_BASE
// (default 0x40000, the start of the upper half of the 512K-word space) or,
// with same_base set, zero, so that results overwrite input words that have
// already been read. A 19-bit multiplexer driven by the controller's sel_wr
// puts the read or the write address on the macro's address port. The
// multiplexer output is combinational from the counter registers.
//
// From the document: an enabled counter as address source, results in the
// upper address space, the alternative with both regions starting at zero, and
// the 19-bit multiplexer selected by the FSM. Using a second counter for the
// write side and the value of WR_BASE are this design's choices.
module address_gen
  import gray_pkg::*;
#(
  parameter logic [ADDR_W-1:0] WR_BASE = ADDR_W'(1) << (ADDR_W - 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic              rd_en,
  input  logic              wr_en,
  input  logic              sel_wr,
  input  logic              same_base,
  output logic [ADDR_W-1:0] addr,
  output logic [ADDR_W-1:0] rd_count,
  output logic [ADDR_W-1:0] wr_count
);

  logic [ADDR_W-1:0] rd_addr, wr_addr;

  en_counter #(.W(ADDR_W)) u_rd_cnt (
    .clk, .rst, .clear, .en(rd_en), .count(rd_count)
  );

  en_counter #(.W(ADDR_W)) u_wr_cnt (
    .clk, .rst, .clear, .en(wr_en), .count(wr_count)
  );

  always_comb begin
    rd_addr = rd_count;
    wr_addr = (same_base ? '0 : WR_BASE) + wr_count;
    addr    = sel_wr ? wr_addr : rd_addr;
  end

endmodule
