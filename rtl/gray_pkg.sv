// gray_pkg: types and constants shared by the grayscale SRAM accelerator.
//
// The board memory is 2 MB organised as two 16-bit banks that share one
// 19-bit word address, giving a 32-bit word to the FPGA (512K words x 32 bits).
// One pixel occupies one 32-bit word: R, G and B in the low three bytes, the
// top byte unused. One result word holds four 8-bit grayscale values, pixel
// 4k+i in byte i. The 19-bit address width and the 32-bit word follow the
// document; the byte order inside a word is this design's own choice.
package gray_pkg;

  localparam int unsigned ADDR_W  = 19;   // word address, 2 MB / 4 bytes
  localparam int unsigned DATA_W  = 32;   // SRAM word seen by the FPGA
  localparam int unsigned BANK_W  = 16;   // data width of one bank
  localparam int unsigned N_BANKS = 2;
  localparam int unsigned PIX_W   = 8;    // one colour channel / one gray value
  localparam int unsigned PIX_PER_WORD = DATA_W / PIX_W;  // results per write

  // Pixel as stored in one SRAM word (bits 31:24 unused).
  typedef struct packed {
    logic [7:0] unused;
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } pixel_word_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // RDWR encoding towards the SRAM macro.
  typedef enum logic {
    RDWR_WRITE = 1'b0,
    RDWR_READ  = 1'b1
  } rdwr_e;

endpackage
