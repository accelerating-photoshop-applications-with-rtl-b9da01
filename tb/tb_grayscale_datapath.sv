// tb_grayscale_datapath: self-checking test of the shift-add grayscale pipeline.
//
// Drives corner pixels and then random pixels with random valid gaps. Every
// accepted pixel is queued with its expected value, computed here from the
// truncated-shift formula with integer division, and the output must appear
// exactly two cycles later. Each result is also compared with the exact
// 0.299/0.587/0.114 weighting: it may be lower by the truncation loss but
// never higher, and never more than 12 below (coefficient loss of at most 2 levels plus
// under one level for each of the ten truncated shifts). The mean shortfall is printed.
module tb_grayscale_datapath;
  import gray_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid, out_valid;
  rgb_t in_pix;
  logic [7:0] out_gray;
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct { int gray; int exact_x1000; int due; } exp_t;
  exp_t q[$];
  longint shortfall_sum = 0;
  int n_results = 0;

  grayscale_datapath dut (.*);

  always #5 clk = ~clk;
  // cycle is updated after the edge, so code woken by the same edge reads the
  // count of the previous one; a pixel driven now is sampled at the next edge
  // and its result is visible after the edge two cycles after that.
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int ref_gray(int r, int g, int b);
    return r/4 + r/32 + r/64 + g/2 + g/16 + g/64 + g/128 + b/16 + b/32 + b/64;
  endfunction

  task automatic drive(input bit v, input int r, input int g, input int b);
    in_valid <= v;
    in_pix   <= '{r: 8'(r), g: 8'(g), b: 8'(b)};
    if (v) q.push_back('{ref_gray(r, g, b), 299*r + 587*g + 114*b, cycle + 3});
    @(posedge clk);
  endtask

  always @(negedge clk) if (!rst) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d", out_gray);
      end else begin
        int exact_floor;
        e = q.pop_front();
        exact_floor = e.exact_x1000 / 1000;
        if (out_gray != 8'(e.gray) || cycle != e.due) begin
          failures++;
          $display("FAIL gray %0d expected %0d at cycle %0d (due %0d)", out_gray, e.gray, cycle, e.due);
        end
        checks++;
        if (int'(out_gray) > exact_floor + 1 || int'(out_gray) < exact_floor - 12) begin
          failures++;
          $display("FAIL gray %0d too far from exact %0d.%03d", out_gray, exact_floor, e.exact_x1000 % 1000);
        end
        shortfall_sum += longint'(e.exact_x1000) - 1000*longint'(out_gray);
        n_results++;
      end
    end
  end

  initial begin
    in_valid = 1'b0;
    in_pix   = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    drive(1, 0, 0, 0);
    drive(1, 255, 255, 255);
    drive(1, 255, 0, 0);
    drive(1, 0, 255, 0);
    drive(1, 0, 0, 255);
    drive(1, 128, 64, 32);
    for (int i = 0; i < 20000; i++)
      drive(($urandom % 4) != 0, $urandom % 256, $urandom % 256, $urandom % 256);
    drive(0, 0, 0, 0);
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    $display("mean shortfall against exact weighting: %0d/1000 gray levels over %0d results",
             int'(shortfall_sum / longint'(n_results > 0 ? n_results : 1)), n_results);
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
