// tb_edge_detector_top: end-to-end test at a reduced size.
//
// A 10 x 12 camera image trimmed to 10 x 8, a serial link of 8 clocks per
// bit and a short knob debounce and short LCD waits keep the run short; the VGA raster keeps
// its full 640 x 480 timing.  Three frames are sent; see edge_tb_body.svh
// for what is checked.
module tb_edge_detector_top;
  localparam int CPB = 8, COLS = 10, ROWS = 8, CAM_ROWS = 12, TRIM = 2, DEB = 4;
  localparam int NFRAMES = 3, NDETENT = 5;
  logic clk = 0, rst, cam_rx, rot_a, rot_b, rot_press;
  logic cam_tx, vga_hs, vga_vs;
  logic [3:0] vga_r, vga_g, vga_b;
  logic [7:0] led;
  logic lcd_e, lcd_rs, lcd_rw;
  logic [3:0] lcd_d;
  logic [14:0] thr_r, thr_g, thr_b;

  edge_detector_top #(
    .CLKS_PER_BIT(CPB), .COLS(COLS), .ROWS(ROWS), .CAM_ROWS(CAM_ROWS),
    .TRIM_TOP(TRIM), .DEBOUNCE(DEB),
    .LCD_POWERON_CLKS(3000), .LCD_INIT_CLKS(1000), .LCD_CMD_CLKS(100), .LCD_CLEAR_CLKS(800)
  ) dut (.*);

  `include "edge_tb_body.svh"

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
