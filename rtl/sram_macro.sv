// sram_macro: synchronous interface between the user circuit and the
// two-bank board SRAM.
//
// The user circuit presents one access per CLK cycle: req, rdwr (RDWR_READ or
// RDWR_WRITE), a 19-bit word address and, for writes, a 32-bit word (OUT).
// At the CLK edge the macro latches address, direction and write word into
// its address register and its to-SRAM buffer, and drives them to both banks
// for the whole following CLK cycle (bank 0 carries bits 15:0, bank 1 bits
// 31:16; both get the same address). A read enables the bank outputs (oe_n
// low) for that whole cycle and the from-SRAM buffer captures the word at the
// next CLK edge, so rdata/rdata_valid appear two CLK cycles after the request.
// A write drives the data bus and pulses we_n low for the middle half of the
// cycle, from the first to the second falling edge of CLK2, giving a quarter
// CLK period of address/data setup and hold around the strobe. One access per
// CLK cycle is sustained.
//
// The document fixes the macro's role, its inputs RDWR, CLK and CLK2 (CLK2 at
// twice the CLK rate, edges aligned), the two 32-bit synchronising buffers
// and the 19-bit address; the exact strobe timing and the per-bank pin set
// (oe_n and we_n per bank, no chip enable) are this design's choices.
//
// CLK2 domain: only the write strobe register, clocked on the falling edge of
// CLK2, which samples CLK-domain registers half a CLK2 period after they
// change. CLK-domain logic reads nothing from the CLK2 domain.
module sram_macro
  import gray_pkg::*;
(
  input  logic                           clk,
  input  logic                           clk2,
  input  logic                           rst,
  // user side
  input  logic                           req,
  input  rdwr_e                          rdwr,
  input  logic [ADDR_W-1:0]              addr,
  input  logic [DATA_W-1:0]              wdata,     // OUT in Figure 7
  output logic [DATA_W-1:0]              rdata,     // IN in Figure 7
  output logic                           rdata_valid,
  // SRAM side, per bank
  output logic [N_BANKS-1:0][ADDR_W-1:0] sram_addr,
  output logic [N_BANKS-1:0][BANK_W-1:0] sram_dout,
  output logic [N_BANKS-1:0]             sram_dout_en,
  output logic [N_BANKS-1:0]             sram_oe_n,
  output logic [N_BANKS-1:0]             sram_we_n,
  input  logic [N_BANKS-1:0][BANK_W-1:0] sram_din
);

  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] to_sram_q;     // to-SRAM buffer
  logic [DATA_W-1:0] from_sram_q;   // from-SRAM buffer
  logic              rd_q, wr_q;
  logic              rd_vld_q;
  logic              cyc_tgl_q;     // toggles every CLK cycle
  logic              seen_tgl_q;    // CLK2 copy of cyc_tgl_q
  logic              we_n_q;

  // CLK domain: request registers.
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q      <= 1'b0;
      wr_q      <= 1'b0;
      rd_vld_q  <= 1'b0;
      cyc_tgl_q <= 1'b0;
    end else begin
      rd_q      <= req && (rdwr == RDWR_READ);
      wr_q      <= req && (rdwr == RDWR_WRITE);
      rd_vld_q  <= rd_q;
      cyc_tgl_q <= ~cyc_tgl_q;
    end
    if (req) begin
      addr_q <= addr;
      if (rdwr == RDWR_WRITE) to_sram_q <= wdata;
    end
    if (rd_q) from_sram_q <= sram_din;
  end

  // CLK2 falling edge: the first one in a CLK cycle sees a new toggle value and
  // opens the strobe, the second one closes it.
  always_ff @(negedge clk2) begin
    if (rst) begin
      seen_tgl_q <= 1'b0;
      we_n_q     <= 1'b1;
    end else begin
      seen_tgl_q <= cyc_tgl_q;
      we_n_q     <= !(wr_q && (cyc_tgl_q != seen_tgl_q));
    end
  end

  always_comb begin
    for (int b = 0; b < N_BANKS; b++) begin
      sram_addr[b]    = addr_q;
      sram_dout[b]    = to_sram_q[b*BANK_W +: BANK_W];
      sram_dout_en[b] = wr_q;
      sram_oe_n[b]    = !rd_q;
      sram_we_n[b]    = we_n_q;
    end
  end

  assign rdata       = from_sram_q;
  assign rdata_valid = rd_vld_q;

  // A strobe only ever belongs to a write cycle.
  a_we_only_on_write: assert property (@(negedge clk2) disable iff (rst) !we_n_q |-> wr_q);

endmodule
