// tb_result_packer: self-checking test of the four-results-per-word packer.
//
// Inputs are driven and outputs sampled at the falling clock edge. The test
// streams random gray values with random gaps, takes a pending word at random
// (always when the next value would complete a new word, as the controller
// does), and sometimes clears in the middle of a group. A model of the byte
// count and of `pending` runs alongside; every word taken must equal the four
// values of its group, value i in byte i.
module tb_result_packer;
  import gray_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic clear, in_valid, take, pending;
  logic [PIX_W-1:0]  in_gray;
  logic [DATA_W-1:0] word;
  int checks = 0, failures = 0;
  int n_words = 0, n_clears = 0, n_take_and_complete = 0;

  result_packer dut (.*);

  always #5 clk = ~clk;

  logic [DATA_W-1:0] expq[$];
  logic [DATA_W-1:0] acc;
  int  idx = 0;
  bit  m_pending = 1'b0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    clear = 1'b0; in_valid = 1'b0; take = 1'b0; in_gray = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      bit v, completes, c;
      @(negedge clk);
      check(pending == m_pending, "pending flag");
      c         = ($urandom % 500) == 0;
      v         = ($urandom % 3) != 0;
      completes = v && idx == 3;
      take      = !c && pending && (completes || ($urandom % 2 == 1));
      if (take) begin
        check(expq.size() > 0 && word == expq[0],
              $sformatf("word %h expected %h", word, (expq.size() > 0) ? expq[0] : 0));
        void'(expq.pop_front());
        n_words++;
      end
      clear    = c;
      in_valid = v;
      in_gray  = PIX_W'($urandom);
      if (c) begin
        idx = 0; m_pending = 0; expq.delete();
        n_clears++;
      end else begin
        if (v) begin
          acc[idx*PIX_W +: PIX_W] = in_gray;
          if (idx == 3) expq.push_back(acc);
          idx = (idx + 1) % 4;
        end
        if (completes && take) n_take_and_complete++;
        if (completes) m_pending = 1;
        else if (take) m_pending = 0;
      end
    end
    @(negedge clk);
    check(n_words > 3000 && n_clears > 10 && n_take_and_complete > 100, "too few cases exercised");
    $display("words %0d clears %0d take-while-completing %0d", n_words, n_clears, n_take_and_complete);
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
