// tb_grayscale_rpu: end-to-end test of the grayscale accelerator with the
// board SRAM model, at the default parameters.
//
// The testbench plays the host: while the accelerator is idle it writes
// random pixels (with a random unused top byte) into SRAM words 0..N-1,
// sets num_pixels and same_base, pulses start and waits for done. It then
// reads the result words back and compares every byte with a gray value
// computed here from the shift-and-add formula. It also checks that input
// words the accelerator must not touch are unchanged, that the SRAM model saw
// no timing violation, that the bus is quiet while the accelerator is idle,
// and that a job of N pixels takes 5N/4 cycles plus a short tail.
//
// The bus is classified every cycle (read, write, or neither) to count the
// mechanisms of the access schedule: runs of four reads, write slots that
// stay empty because no result is ready yet, write slots that carry a result
// word, drain writes after the last read, jobs into the upper half and jobs
// that overwrite consumed inputs (same_base). Each must occur at least once.
module tb_grayscale_rpu;
  import gray_pkg::*;

  logic clk = 1'b0, clk2 = 1'b0, rst = 1'b1;
  logic start, same_base, busy, done;
  logic [ADDR_W-1:0] num_pixels;
  logic [N_BANKS-1:0][ADDR_W-1:0] sram_addr;
  logic [N_BANKS-1:0][BANK_W-1:0] sram_dout, sram_din;
  logic [N_BANKS-1:0] sram_dout_en, sram_oe_n, sram_we_n;
  int violations, mem_writes;
  int checks = 0, failures = 0;

  localparam logic [ADDR_W-1:0] UPPER = 19'h40000;

  grayscale_rpu dut (.*);

  sram_model #(.ADDR_W(ADDR_W), .BANK_W(BANK_W), .N_BANKS(N_BANKS)) u_mem (
    .addr(sram_addr), .din(sram_dout), .din_en(sram_dout_en), .oe_n(sram_oe_n),
    .we_n(sram_we_n), .dout(sram_din), .violations, .writes(mem_writes)
  );

  always #5 clk2 = ~clk2;
  initial begin
    #5;
    forever begin clk = ~clk; #10; end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  function automatic logic [7:0] ref_gray(logic [DATA_W-1:0] w);
    int r = int'(w[23:16]), g = int'(w[15:8]), b = int'(w[7:0]);
    return 8'(r/4 + r/32 + r/64 + g/2 + g/16 + g/64 + g/128 + b/16 + b/32 + b/64);
  endfunction

  // Bus classification, sampled in the middle of each CLK cycle.
  int n_read_runs = 0, n_empty_slots = 0, n_slot_writes = 0, n_drain_writes = 0;
  int n_upper_jobs = 0, n_same_base_jobs = 0;
  int run = 0, reads_in_job = 0, job_pixels = 0;
  bit after_run = 0, quiet_prev = 1;
  always @(negedge clk) if (!rst) begin
    bit rd, wr;
    rd = (sram_oe_n == 2'b00);
    wr = (sram_we_n == 2'b00);
    if (rd) begin
      run++;
      reads_in_job++;
      if (run == 4) n_read_runs++;
      after_run = (run == 4);
      if (run == 4) run = 0;
    end else begin
      if (after_run) begin
        if (wr) n_slot_writes++;
        else if (busy) n_empty_slots++;
      end
      if (wr && !after_run && reads_in_job == job_pixels) n_drain_writes++;
      after_run = 0;
    end
    if (!busy && quiet_prev)
      check(sram_oe_n == 2'b11 && sram_we_n == 2'b11 && sram_dout_en == 2'b00,
            "bus driven while idle");
    quiet_prev = !busy;
  end

  task automatic run_job(input int n_req, input bit sb);
    int n = n_req & ~3;
    int cycles = 0;
    logic [DATA_W-1:0] img [];
    logic [ADDR_W-1:0] base = sb ? '0 : UPPER;
    img = new[n];
    for (int i = 0; i < n; i++) begin
      img[i] = $urandom;
      u_mem.host_write(ADDR_W'(i), img[i]);
    end
    // Words just past the input and around the result region must survive.
    u_mem.host_write(ADDR_W'(n), 32'hA5A5_0001);
    if (!sb) u_mem.host_write(UPPER + ADDR_W'(n / 4), 32'h5A5A_0002);
    @(negedge clk);
    num_pixels = ADDR_W'(n_req);
    same_base  = sb;
    start      = 1'b1;
    reads_in_job = 0;
    job_pixels   = n;
    @(negedge clk);
    start = 1'b0;
    while (!done && cycles < 2 * n + 100) begin
      @(negedge clk);
      cycles++;
    end
    check(done && !busy, $sformatf("job of %0d pixels did not finish", n));
    check(cycles >= 5 * n / 4 && cycles <= 5 * n / 4 + 10,
          $sformatf("job of %0d pixels took %0d cycles, expected %0d plus a short tail", n, cycles, 5 * n / 4));
    repeat (2) @(negedge clk);
    for (int k = 0; k < n / 4; k++) begin
      logic [DATA_W-1:0] w, e;
      w = u_mem.host_read(base + ADDR_W'(k));
      e = {ref_gray(img[4*k+3]), ref_gray(img[4*k+2]), ref_gray(img[4*k+1]), ref_gray(img[4*k])};
      check(w == e, $sformatf("result word %0d: %h expected %h", k, w, e));
    end
    if (!sb)
      for (int i = 0; i < n; i++)
        check(u_mem.host_read(ADDR_W'(i)) == img[i], "input word overwritten");
    else
      for (int i = n / 4; i < n; i++)
        check(u_mem.host_read(ADDR_W'(i)) == img[i], "unconsumed input word overwritten");
    check(u_mem.host_read(ADDR_W'(n)) == 32'hA5A5_0001, "word after the input touched");
    if (!sb) check(u_mem.host_read(UPPER + ADDR_W'(n / 4)) == 32'h5A5A_0002, "word after the results touched");
    if (sb) n_same_base_jobs++; else n_upper_jobs++;
    $display("job: %0d pixels, %s, %0d cycles (%0d.%02d per pixel)", n, sb ? "same base" : "upper half",
             cycles, cycles / n, (100 * cycles / n) % 100);
  endtask

  initial begin
    start = 1'b0; same_base = 1'b0; num_pixels = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    check(!busy && !done, "idle after reset");
    run_job(4, 0);
    run_job(8, 1);
    run_job(10, 0);          // low two bits of the size are ignored
    run_job(64, 1);
    run_job(1000, 0);
    run_job(4000, 1);
    check(violations == 0, $sformatf("%0d SRAM timing violations", violations));
    check(n_read_runs > 0,      "no run of four reads");
    check(n_empty_slots > 0,    "no empty write slot");
    check(n_slot_writes > 0,    "no write in a write slot");
    check(n_drain_writes > 0,   "no drain write");
    check(n_upper_jobs > 0,     "no upper-half job");
    check(n_same_base_jobs > 0, "no same-base job");
    $display("read runs %0d, empty slots %0d, slot writes %0d, drain writes %0d, upper jobs %0d, same-base jobs %0d",
             n_read_runs, n_empty_slots, n_slot_writes, n_drain_writes, n_upper_jobs, n_same_base_jobs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
