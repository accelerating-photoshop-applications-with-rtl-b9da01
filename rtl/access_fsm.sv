// access_fsm: controller that sequences the FPGA's SRAM accesses for one
// grayscale job.
//
// After `start` the controller clears the address counters and the result
// packer and repeats a five-cycle pattern: four reads of consecutive pixel
// words (READ), then one write slot (WSLOT). Because of the read latency of
// the SRAM macro and the two-stage datapath, the word written in a write slot
// holds the results of the group read before the current one; in the first
// write slot nothing is ready yet and the slot stays idle. When all
// num_pixels words have been read, DRAIN writes the last word as soon as the
// packer has it. The job ends when num_pixels/4 result words are written:
// `done` rises and stays high until the next `start`. `busy` is high from
// start to done. Steady state is 5 cycles per 4 pixels, 1.25 cycles per pixel.
//
// Per cycle the controller drives req and rdwr to the SRAM macro, rd_en or
// wr_en to the address counters, sel_wr to the address multiplexer (all in
// the same cycle, combinationally from the state) and take to the packer.
// num_pixels must be a non-zero multiple of four (the low two bits are
// ignored); it is sampled continuously, so hold it stable while busy.
//
// From the document: four reads then one write per four pixels, addresses and
// RDWR produced together by the FSM. The state encoding, the write-slot lag
// by one group, the drain phase and the start/done handshake are this
// design's choices.
module access_fsm
  import gray_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [ADDR_W-1:0] num_pixels,
  input  logic [ADDR_W-1:0] rd_count,
  input  logic [ADDR_W-1:0] wr_count,
  input  logic              pending,
  output logic              clear,
  output logic              req,
  output rdwr_e             rdwr,
  output logic              rd_en,
  output logic              wr_en,
  output logic              sel_wr,
  output logic              take,
  output logic              busy,
  output logic              done
);

  typedef enum logic [1:0] {
    S_IDLE,
    S_READ,
    S_WSLOT,
    S_DRAIN
  } state_e;

  state_e            state_q, state_d;
  logic              done_q;
  logic [ADDR_W-1:0] n_pix, n_words;
  logic              reads_done, writes_done, do_write;

  always_comb begin
    n_pix       = {num_pixels[ADDR_W-1:2], 2'b00};
    n_words     = n_pix >> 2;
    reads_done  = (rd_count == n_pix);
    writes_done = (wr_count == n_words);
  end

  always_comb begin
    state_d  = state_q;
    clear    = 1'b0;
    req      = 1'b0;
    rdwr     = RDWR_READ;
    rd_en    = 1'b0;
    wr_en    = 1'b0;
    sel_wr   = 1'b0;
    do_write = 1'b0;
    unique case (state_q)
      S_IDLE: begin
        if (start) begin
          clear   = 1'b1;
          state_d = (n_pix == '0) ? S_IDLE : S_READ;
        end
      end
      S_READ: begin
        req   = 1'b1;
        rdwr  = RDWR_READ;
        rd_en = 1'b1;
        if (rd_count[1:0] == 2'd3) state_d = S_WSLOT;
      end
      S_WSLOT: begin
        do_write = pending;
        state_d  = reads_done ? S_DRAIN : S_READ;
      end
      S_DRAIN: begin
        do_write = pending;
        if (writes_done) state_d = S_IDLE;
      end
      default: state_d = S_IDLE;
    endcase
    if (do_write) begin
      req    = 1'b1;
      rdwr   = RDWR_WRITE;
      wr_en  = 1'b1;
      sel_wr = 1'b1;
    end
  end

  assign take = do_write;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      done_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      if (state_q == S_IDLE && start)              done_q <= (n_pix == '0);
      else if (state_q == S_DRAIN && writes_done)  done_q <= 1'b1;
    end
  end

  assign done = done_q;
  assign busy = (state_q != S_IDLE);

  // The read counter never passes the job size, the write counter never
  // passes the number of result words.
  a_reads_bounded: assert property (@(posedge clk) disable iff (rst)
                                    rd_en |-> rd_count < n_pix);
  a_writes_bounded: assert property (@(posedge clk) disable iff (rst)
                                     wr_en |-> wr_count < n_words);

endmodule
