// tb_access_fsm: self-checking test of the SRAM access controller.
//
// The testbench stands in for the address counters and for the result path:
// it counts reads and writes itself and raises `pending` a fixed number of
// cycles (1 to 5, changed from job to job) after the fourth read of each group,
// as the macro, datapath and packer do. Inputs are driven and outputs sampled
// at the falling edge. For jobs of random size it checks, cycle by cycle:
// reads come in runs of four followed by one non-read slot, every output
// combination is consistent (req/rdwr/sel_wr/enables/take), a pending word
// is always written in the first free slot, no completion finds an unwritten
// word, and done rises after exactly N reads and N/4 writes. The time from
// start to done must be 5N/4 cycles plus a tail no longer than the result
// latency plus three cycles, i.e. 1.25 cycles per pixel. A zero-size job
// must finish at once.
module tb_access_fsm;
  import gray_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic start, pending, clear, req, rd_en, wr_en, sel_wr, take, busy, done;
  rdwr_e rdwr;
  logic [ADDR_W-1:0] num_pixels, rd_count, wr_count;
  int checks = 0, failures = 0;
  int n_idle_slots = 0, n_slot_writes = 0, n_drain_writes = 0;

  access_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  int m_rd, m_wr;
  bit m_pending;
  int due[$];          // cycles at which a word completes

  task automatic run_job(input int n, input int lat);
    int cyc = 0, run = 0, done_cycle = -1;
    bit prev_run4 = 0;
    m_pending = 0;
    due.delete();
    num_pixels = ADDR_W'(n);
    start = 1'b1;
    pending = 1'b0;
    rd_count = ADDR_W'(m_rd);
    wr_count = ADDR_W'(m_wr);
    #1;
    check(clear, "clear at start");
    check(!req, "no access in the start cycle");
    @(negedge clk);
    start = 1'b0;
    m_rd = 0; m_wr = 0;
    while (done_cycle < 0 && cyc < 5 * n + 100) begin
      cyc++;
      while (due.size() > 0 && due[0] == cyc) begin
        void'(due.pop_front());
        check(!m_pending, "word completed before the previous one was written");
        m_pending = 1;
      end
      pending  = m_pending;
      rd_count = ADDR_W'(m_rd);
      wr_count = ADDR_W'(m_wr);
      #1;
      if (!busy) begin
        done_cycle = cyc;
        check(done, "done when the job ends");
        check(m_rd == n && m_wr == n / 4, $sformatf("job ended after %0d reads, %0d writes", m_rd, m_wr));
      end else begin
        check(!done, "done while busy");
        check(!rd_en || (req && rdwr == RDWR_READ && !sel_wr && !wr_en && !take), "read outputs");
        check(!wr_en || (req && rdwr == RDWR_WRITE && sel_wr && take && pending), "write outputs");
        check(!req || rd_en || wr_en, "request without counter step");
        if (!rd_en) begin
          check(wr_en == pending, "pending word not written in a free slot");
          check(run == 0 || run == 4, "read run broken");
          if (run == 4 && !wr_en) n_idle_slots++;
          if (wr_en && m_rd < n) n_slot_writes++;
          if (wr_en && m_rd == n) n_drain_writes++;
          run = 0;
        end else begin
          check(run < 4, "more than four reads in a row");
          run++;
        end
        if (rd_en) begin
          m_rd++;
          if (m_rd % 4 == 0) due.push_back(cyc + lat);
        end
        if (wr_en) begin
          m_wr++;
          m_pending = 0;
        end
      end
      @(negedge clk);
    end
    check(done_cycle >= 5 * n / 4 && done_cycle <= 5 * n / 4 + lat + 3,
          $sformatf("job of %0d pixels took %0d cycles", n, done_cycle));
    check(done, "done stays high");
  endtask

  initial begin
    start = 1'b0; pending = 1'b0; num_pixels = '0; rd_count = '0; wr_count = '0;
    m_rd = 0; m_wr = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!busy && !done && !req, "idle after reset");
    // zero-size job
    num_pixels = '0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    #1;
    check(!busy && done, "empty job finishes at once");
    @(negedge clk);
    run_job(4, 5);
    run_job(8, 1);
    for (int j = 0; j < 40; j++)
      run_job(4 * (1 + $urandom % 300), 1 + $urandom % 5);
    run_job(4096, 5);
    check(n_idle_slots >= 10 && n_slot_writes > 0 && n_drain_writes >= 40, "cases exercised");
    $display("idle slots %0d slot writes %0d drain writes %0d", n_idle_slots, n_slot_writes, n_drain_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
