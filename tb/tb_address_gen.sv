// tb_address_gen: self-checking test of the read/write address generator.
//
// Inputs are driven and outputs sampled at the falling clock edge. Random
// enables, clears, multiplexer selects and base modes are applied for 20000
// cycles; the read and write counts and the multiplexed address are compared
// with a model: read address = read count, write address = write count plus
// 0x40000, or plus zero in same-base mode. Near the end the read counter is
// run up to its top value to check the 19-bit wrap.
module tb_address_gen;
  import gray_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic clear, rd_en, wr_en, sel_wr, same_base;
  logic [ADDR_W-1:0] addr, rd_count, wr_count;
  int checks = 0, failures = 0;

  localparam logic [ADDR_W-1:0] BASE = 19'h40000;

  address_gen dut (.*);

  always #5 clk = ~clk;

  logic [ADDR_W-1:0] m_rd = '0, m_wr = '0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  task automatic step(input bit c, input bit re, input bit we, input bit sw, input bit sb);
    logic [ADDR_W-1:0] exp_addr;
    clear = c; rd_en = re; wr_en = we; sel_wr = sw; same_base = sb;
    #1;
    exp_addr = sw ? ((sb ? '0 : BASE) + m_wr) : m_rd;
    check(addr == exp_addr, $sformatf("addr %h expected %h", addr, exp_addr));
    check(rd_count == m_rd && wr_count == m_wr, "counts");
    @(negedge clk);
    if (c) begin m_rd = '0; m_wr = '0; end
    else begin
      if (re) m_rd++;
      if (we) m_wr++;
    end
  endtask

  initial begin
    clear = 1'b0; rd_en = 1'b0; wr_en = 1'b0; sel_wr = 1'b0; same_base = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 20000; i++)
      step(($urandom % 1000) == 0, ($urandom % 2) == 1, ($urandom % 4) == 0,
           ($urandom % 2) == 1, ($urandom % 2) == 1);
    step(1, 0, 0, 0, 0);
    for (int i = 0; i < (1 << ADDR_W) + 3; i++) begin
      clear = 1'b0; rd_en = 1'b1; wr_en = 1'b0; sel_wr = 1'b0;
      @(negedge clk);
      m_rd++;
    end
    step(0, 0, 0, 0, 0);
    check(m_rd == 19'd3, "wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
