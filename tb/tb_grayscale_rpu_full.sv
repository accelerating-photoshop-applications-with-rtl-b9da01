// tb_grayscale_rpu_full: full-size run of the grayscale accelerator at its
// default parameters, on the job size of the original system.
//
// A 1280 x 1024 RGB image (1,310,720 pixels) is converted in five iterations
// of 262,144 pixels, the most one iteration handles with inputs in the lower
// half of the 512K-word SRAM and results in the upper half. For each
// iteration the host side of the testbench loads the pixels into words
// 0..262143, starts the accelerator, waits for done, and reads the 65,536
// result words from 0x40000 on; every gray value is compared with the
// shift-and-add formula computed here. Each iteration must take
// 5 x 262144 / 4 = 327,680 cycles plus a tail of at most ten, which at the
// original 20 MHz clock is 16.4 ms per iteration. A second workload of
// 10^6 pixels runs the same way in four iterations, the last one of 213,568
// pixels; 1.25 x 10^6 cycles correspond to 62.5 ms at 20 MHz.
module tb_grayscale_rpu_full;
  import gray_pkg::*;

  localparam int unsigned WIDTH  = 1280;
  localparam int unsigned HEIGHT = 1024;
  localparam int unsigned ITER   = 262144;
  localparam logic [ADDR_W-1:0] UPPER = 19'h40000;

  logic clk = 1'b0, clk2 = 1'b0, rst = 1'b1;
  logic start, same_base, busy, done;
  logic [ADDR_W-1:0] num_pixels;
  logic [N_BANKS-1:0][ADDR_W-1:0] sram_addr;
  logic [N_BANKS-1:0][BANK_W-1:0] sram_dout, sram_din;
  logic [N_BANKS-1:0] sram_dout_en, sram_oe_n, sram_we_n;
  int violations, mem_writes;
  int checks = 0, failures = 0;

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

  // Synthetic image: colour ramps plus noise, so all channel values occur.
  function automatic logic [DATA_W-1:0] pixel_at(int unsigned idx);
    int unsigned x = idx % WIDTH, y = idx / WIDTH;
    logic [7:0] r = 8'(x * 255 / (WIDTH - 1));
    logic [7:0] g = 8'(y * 255 / (HEIGHT - 1));
    logic [7:0] b = 8'($urandom);
    return {8'($urandom), r, g, b};
  endfunction

  logic [DATA_W-1:0] img [];

  // One iteration: load n pixels starting at image index first, run, check.
  task automatic run_iteration(input int unsigned first, input int unsigned n,
                               input string tag, inout longint cyc_sum);
    int cycles, bad;
    cycles = 0;
    bad    = 0;
    for (int unsigned i = 0; i < n; i++) begin
      img[i] = pixel_at(first + i);
      u_mem.host_write(ADDR_W'(i), img[i]);
    end
    num_pixels = ADDR_W'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cycles < 2 * ITER) begin
      @(negedge clk);
      cycles++;
    end
    cyc_sum += longint'(cycles);
    check(done, $sformatf("%s: iteration at pixel %0d did not finish", tag, first));
    check(cycles >= 5 * n / 4 && cycles <= 5 * n / 4 + 10,
          $sformatf("%s: iteration at pixel %0d took %0d cycles", tag, first, cycles));
    repeat (2) @(negedge clk);
    for (int unsigned k = 0; k < n / 4; k++) begin
      logic [DATA_W-1:0] w;
      w = u_mem.host_read(UPPER + ADDR_W'(k));
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (w[8*p +: 8] != ref_gray(img[4*k+p])) begin
          bad++;
          failures++;
          if (bad <= 5) $display("FAIL %s pixel %0d: %0d expected %0d",
                                 tag, first + 4*k+p, w[8*p +: 8], ref_gray(img[4*k+p]));
        end
      end
    end
    $display("%s: pixels %0d..%0d in %0d cycles = %0d us at 20 MHz, %0d wrong",
             tag, first, first + n - 1, cycles, cycles / 20, bad);
  endtask

  // A job of total pixels, cut into iterations of at most ITER pixels.
  task automatic run_workload(input int unsigned total, input string tag);
    longint cyc_sum = 0;
    for (int unsigned first = 0; first < total; first += ITER)
      run_iteration(first, (total - first < ITER) ? total - first : ITER, tag, cyc_sum);
    $display("%s: %0d pixels, %0d cycles in total = %0d us at 20 MHz (%0d.%03d cycles per pixel)",
             tag, total, cyc_sum, cyc_sum / 20, cyc_sum / total, (1000 * cyc_sum / total) % 1000);
  endtask

  initial begin
    start = 1'b0; same_base = 1'b0; num_pixels = '0;
    img = new[ITER];
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    run_workload(WIDTH * HEIGHT, "1280x1024 image");
    run_workload(1_000_000, "10^6 pixels");
    check(violations == 0, $sformatf("%0d SRAM timing violations", violations));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
