// grayscale_rpu: the FPGA configuration of the on-board-SRAM grayscale
// converter.
//
// The host fills the lower part of the board SRAM with pixels (one RGB pixel
// per 32-bit word, word 0 upward), hands the memory bus to the FPGA and sets
// num_pixels and start through the FPGA's register access. The FPGA then
// streams the pixels through its SRAM macro, converts each to an 8-bit gray
// value with a shift-and-add pipeline, packs four results per word and
// writes them to the result region: from WR_BASE (upper half, default) or,
// with same_base set, from word 0 over inputs that were already consumed.
// When `done` rises the host takes the bus back and reads the results.
//
// Blocks: access_fsm (sequencing), address_gen (counters and 19-bit address
// multiplexer), sram_macro (SRAM timing and the two 32-bit buffers),
// grayscale_datapath (two-stage shift-add pipeline), result_packer (4 x 8 bits
// to 32 bits). The SRAM appears as two 16-bit banks with a shared address;
// while the design is idle it drives no strobe and no data (sram_dout_en low,
// oe_n and we_n high), so the host side may use the bus.
//
// Timing: CLK is the main clock (20 MHz on the original board), CLK2 runs at
// twice that rate with aligned rising edges and is used only for the write
// strobe. A job of N pixels takes 5N/4 cycles plus a fixed tail of a few
// cycles for the last result word. rst is synchronous and active high.
module grayscale_rpu
  import gray_pkg::*;
#(
  parameter logic [ADDR_W-1:0] WR_BASE = ADDR_W'(1) << (ADDR_W - 1)
) (
  input  logic                           clk,
  input  logic                           clk2,
  input  logic                           rst,
  // control registers written and read by the host
  input  logic                           start,
  input  logic [ADDR_W-1:0]              num_pixels,
  input  logic                           same_base,
  output logic                           busy,
  output logic                           done,
  // board SRAM, two banks
  output logic [N_BANKS-1:0][ADDR_W-1:0] sram_addr,
  output logic [N_BANKS-1:0][BANK_W-1:0] sram_dout,
  output logic [N_BANKS-1:0]             sram_dout_en,
  output logic [N_BANKS-1:0]             sram_oe_n,
  output logic [N_BANKS-1:0]             sram_we_n,
  input  logic [N_BANKS-1:0][BANK_W-1:0] sram_din
);

  logic              clear, req, rd_en, wr_en, sel_wr, take, pending;
  rdwr_e             rdwr;
  logic [ADDR_W-1:0] addr, rd_count, wr_count;
  logic [DATA_W-1:0] rdata, wword;
  logic              rdata_valid;
  pixel_word_t       pix_word;
  rgb_t              pix;
  logic              gray_valid;
  logic [PIX_W-1:0]  gray;

  access_fsm u_fsm (
    .clk, .rst, .start, .num_pixels, .rd_count, .wr_count, .pending,
    .clear, .req, .rdwr, .rd_en, .wr_en, .sel_wr, .take, .busy, .done
  );

  address_gen #(.WR_BASE(WR_BASE)) u_addr (
    .clk, .rst, .clear, .rd_en, .wr_en, .sel_wr, .same_base,
    .addr, .rd_count, .wr_count
  );

  sram_macro u_sram_macro (
    .clk, .clk2, .rst, .req, .rdwr, .addr, .wdata(wword),
    .rdata, .rdata_valid,
    .sram_addr, .sram_dout, .sram_dout_en, .sram_oe_n, .sram_we_n, .sram_din
  );

  always_comb begin
    pix_word = pixel_word_t'(rdata);
    pix      = '{r: pix_word.r, g: pix_word.g, b: pix_word.b};
  end

  grayscale_datapath u_dp (
    .clk, .rst, .in_valid(rdata_valid), .in_pix(pix),
    .out_valid(gray_valid), .out_gray(gray)
  );

  result_packer u_pack (
    .clk, .rst, .clear, .in_valid(gray_valid), .in_gray(gray),
    .take, .pending, .word(wword)
  );

endmodule
