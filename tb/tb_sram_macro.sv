// tb_sram_macro: self-checking test of the SRAM macro against the behavioural
// two-bank SRAM model.
//
// CLK2 runs at twice the CLK rate with rising edges aligned. The test issues
// 4000 random accesses (reads and writes to a 64-word window, with idle
// cycles in between) and keeps its own copy of the memory. Each read must
// return the last word written to its address exactly two CLK cycles after
// the request. In every cycle the bus must match the request of the previous
// cycle: output enables only for a read, data drive only for a write, and a
// write strobe that is high in the first quarter of the cycle and low at its
// middle. The SRAM model counts setup/hold violations, which must stay zero.
module tb_sram_macro;
  import gray_pkg::*;

  logic clk = 1'b0, clk2 = 1'b0, rst = 1'b1;
  logic req;
  rdwr_e rdwr;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] wdata, rdata;
  logic rdata_valid;
  logic [N_BANKS-1:0][ADDR_W-1:0] sram_addr;
  logic [N_BANKS-1:0][BANK_W-1:0] sram_dout, sram_din;
  logic [N_BANKS-1:0] sram_dout_en, sram_oe_n, sram_we_n;
  int violations, mem_writes;
  int checks = 0, failures = 0, cycle = 0;
  int n_reads = 0, n_writes = 0;

  sram_macro dut (.*);

  sram_model #(.ADDR_W(ADDR_W), .BANK_W(BANK_W), .N_BANKS(N_BANKS)) u_mem (
    .addr(sram_addr), .din(sram_dout), .din_en(sram_dout_en), .oe_n(sram_oe_n),
    .we_n(sram_we_n), .dout(sram_din), .violations, .writes(mem_writes)
  );

  always #5 clk2 = ~clk2;
  initial begin
    #5;
    forever begin clk = ~clk; #10; end
  end
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [DATA_W-1:0] data; int due; } rd_exp_t;
  rd_exp_t rq[$];
  logic [DATA_W-1:0] ref_mem [logic [ADDR_W-1:0]];
  typedef enum { K_IDLE, K_READ, K_WRITE } kind_e;
  typedef struct { kind_e kind; int due; } bus_exp_t;
  bus_exp_t kind_q[$];   // what the bus must show, and in which cycle

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, msg);
    end
  endtask

  // Read data.
  always @(negedge clk) if (!rst && rdata_valid) begin
    rd_exp_t e;
    if (rq.size() == 0) check(0, "read data without a request");
    else begin
      e = rq.pop_front();
      check(rdata == e.data && cycle == e.due,
            $sformatf("read %h expected %h at cycle %0d due %0d", rdata, e.data, cycle, e.due));
    end
  end

  // Bus state: first quarter of the cycle and middle of the cycle.
  always @(posedge clk) begin
    kind_e k;
    #2;
    if (kind_q.size() > 0 && kind_q[0].due == cycle) begin
      k = kind_q.pop_front().kind;
      check(&sram_we_n, "write strobe low in the first quarter of a cycle");
      #5;
      check(sram_oe_n == ((k == K_READ) ? 2'b00 : 2'b11), "output enables wrong");
      check(sram_we_n == ((k == K_WRITE) ? 2'b00 : 2'b11), "write strobe wrong at mid cycle");
      check(sram_dout_en == ((k == K_WRITE) ? 2'b11 : 2'b00), "data drive wrong");
    end
  end

  initial begin
    req = 1'b0; rdwr = RDWR_READ; addr = '0; wdata = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      int sel;
      logic [ADDR_W-1:0] a;
      logic [DATA_W-1:0] w;
      sel = $urandom % 8;
      a   = ADDR_W'($urandom % 64) | (ADDR_W'(i % 2) << (ADDR_W - 1));
      w   = $urandom;
      if (sel < 3) begin
        req <= 1'b1; rdwr <= RDWR_WRITE; addr <= a; wdata <= w;
        ref_mem[a] = w;
        n_writes++;
        kind_q.push_back('{K_WRITE, cycle + 2});
      end else if (sel < 6 && ref_mem.exists(a)) begin
        req <= 1'b1; rdwr <= RDWR_READ; addr <= a; wdata <= $urandom;
        rq.push_back('{ref_mem[a], cycle + 3});
        n_reads++;
        kind_q.push_back('{K_READ, cycle + 2});
      end else begin
        req <= 1'b0; rdwr <= rdwr_e'($urandom % 2); addr <= $urandom; wdata <= $urandom;
        kind_q.push_back('{K_IDLE, cycle + 2});
      end
      @(posedge clk);
    end
    req <= 1'b0;
    repeat (6) @(posedge clk);
    check(rq.size() == 0, $sformatf("%0d reads without data, first due %0d", rq.size(), rq.size() ? rq[0].due : 0));
    check(violations == 0, $sformatf("%0d SRAM timing violations", violations));
    check(mem_writes == n_writes, $sformatf("%0d SRAM writes for %0d requests", mem_writes, n_writes));
    check(n_reads > 1000 && n_writes > 1000, "too few accesses exercised");
    $display("reads %0d writes %0d", n_reads, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
