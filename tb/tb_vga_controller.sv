// tb_vga_controller: checks raster timing, pixel replication and borders.
//
// Runs the controller at its full 640x480 size against a frame-buffer model
// whose word at address a holds a pattern derived from a.  From the first
// `frame_start` on, it steps through two whole frames of 800 x 525 pixel
// positions, two clocks apart, and checks at each one the colour (the word
// of image pixel (x/8, y/4), black on the image border and outside the
// active area), horizontal and vertical sync, and that each pixel lasts two
// clocks (25 MHz out of 50 MHz).  It also checks the frame period of
// 840,000 clocks (59.5 Hz).
module tb_vga_controller;
  import edge_pkg::*;
  localparam int COLS = 80, ROWS = 120;
  logic clk = 0, rst = 1;
  logic [FB_AW-1:0] fb_raddr;
  rgb12_t fb_rdata;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs, pix_tick, frame_start;
  int checks = 0, failures = 0, nerr = 0;
  longint cyc = 0, fs_last = -1;
  int nframes = 0;

  vga_controller dut (.clk, .rst, .fb_raddr, .fb_rdata, .vga_r, .vga_g, .vga_b,
                      .vga_hs, .vga_vs, .pix_tick, .frame_start);

  function automatic logic [11:0] pattern(input int a);
    return 12'((a * 37) ^ (a >> 3) ^ 12'h5A5);
  endfunction

  always #5 clk = !clk;
  always @(posedge clk) begin
    cyc++;
    fb_rdata <= pattern(int'(fb_raddr));
    if (frame_start) begin
      if (fs_last >= 0) begin
        checks++;
        if (cyc - fs_last != 840000) begin failures++; $display("FAIL frame period %0d", cyc - fs_last); end
      end
      fs_last = cyc;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (nerr++ < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    #1;
    while (!frame_start) begin @(posedge clk); #1; end
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < 525; y++) begin
        automatic int line_err = 0;
        for (int x = 0; x < 800; x++) begin
          logic [11:0] e;
          automatic int ix = x / 8, iy = y / 4;
          automatic bit hs_e = !(x >= 656 && x < 752);
          automatic bit vs_e = !(y >= 490 && y < 492);
          if (x < 640 && y < 480 && ix > 0 && ix < COLS - 1 && iy > 0 && iy < ROWS - 1)
            e = pattern(iy * COLS + ix);
          else e = '0;
          if ({vga_r, vga_g, vga_b} != e || vga_hs != hs_e || vga_vs != vs_e) begin
            line_err++;
            if (nerr++ < 20) $display("FAIL (%0d,%0d) rgb %h/%h hs %b vs %b", x, y, {vga_r, vga_g, vga_b}, e, vga_hs, vga_vs);
          end
          @(posedge clk);
          #1;
          if ({vga_r, vga_g, vga_b} != e) line_err++;   // still the same pixel
          @(posedge clk);
          #1;
        end
        checks++;
        if (line_err != 0) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
