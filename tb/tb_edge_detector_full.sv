// tb_edge_detector_full: end-to-end test with every parameter at its
// default: 115,200 baud from 50 MHz, 80 x 143 camera frames trimmed to
// 80 x 120, 1 ms knob debounce, 640 x 480 VGA.  Two frames (about 150
// million clocks each on the serial link); see edge_tb_body.svh for what
// is checked.
module tb_edge_detector_full;
  localparam int CPB = 434, COLS = 80, ROWS = 120, CAM_ROWS = 143, TRIM = 11, DEB = 50000;
  localparam int NFRAMES = 2, NDETENT = 2;
  logic clk = 0, rst, cam_rx, rot_a, rot_b, rot_press;
  logic cam_tx, vga_hs, vga_vs;
  logic [3:0] vga_r, vga_g, vga_b;
  logic [7:0] led;
  logic lcd_e, lcd_rs, lcd_rw;
  logic [3:0] lcd_d;
  logic [14:0] thr_r, thr_g, thr_b;

  edge_detector_top dut (.*);

  `include "edge_tb_body.svh"

  initial begin
    repeat (400_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
