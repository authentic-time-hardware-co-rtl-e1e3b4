// tb_adaptive_threshold: checks the frame-mean seed and the scaled threshold.
//
// Feeds frames of random gradients (including an all-zero frame and a frame
// with no gradients at all), then checks after each frame end that the seed
// equals the integer mean of the frame, that the threshold is
// (seed * factor) >> 4 for several factors, that `busy` lasts SUM_W + 1
// clocks, and that the seed is 0 after reset.
module tb_adaptive_threshold;
  import edge_pkg::*;
  logic clk = 0, rst = 1, grad_valid = 0, frame_end = 0;
  logic [GRAD_W-1:0] grad = 0;
  logic [FAC_W-1:0] factor = 16;
  logic busy;
  logic [GRAD_W-1:0] seed;
  logic [THR_W-1:0] thr;
  int checks = 0, failures = 0;
  int exp_seed = 0;

  adaptive_threshold dut (.clk, .rst, .grad_valid, .grad, .frame_end, .factor, .busy, .seed, .thr);

  always #5 clk = !clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic frame(input int n, input int maxg);
    longint sum = 0;
    int busy_len = 0;
    for (int i = 0; i < n; i++) begin
      int g = $urandom_range(0, maxg);
      grad_valid <= 1; grad <= GRAD_W'(g); sum += g;
      @(posedge clk);
      repeat ($urandom_range(0, 3)) begin grad_valid <= 0; @(posedge clk); end
    end
    grad_valid <= 0;
    frame_end <= 1; @(posedge clk); frame_end <= 0;
    @(posedge clk);
    while (busy) begin busy_len++; @(posedge clk); end
    if (n > 0) begin
      exp_seed = int'(sum / n);
      check(busy_len == 26, $sformatf("busy for %0d clocks", busy_len));
    end else check(busy_len == 0, "no division for an empty frame");
    check(int'(seed) == exp_seed, $sformatf("seed %0d expected %0d (n=%0d)", seed, exp_seed, n));
    foreach (fac_list[i]) begin
      factor <= FAC_W'(fac_list[i]);
      @(posedge clk); #1;
      check(int'(thr) == (exp_seed * fac_list[i]) / 16,
            $sformatf("thr %0d for seed %0d factor %0d", thr, exp_seed, fac_list[i]));
    end
  endtask

  int fac_list [5] = '{16, 1, 255, 24, 8};

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(seed == 0 && thr == 0, "seed 0 after reset");
    frame(100, 2040);
    frame(500, 300);
    frame(40, 0);
    frame(0, 0);        // keeps the previous seed
    frame(9204, 2040);  // a full 80x120 interior
    frame(9204, 2040);
    frame(7, 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
