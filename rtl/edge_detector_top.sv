// edge_detector_top: real-time video edge detector, camera to VGA.
//
// A serial camera dumps frames of 80 x 143 RGB pixels column by column over
// RS-232 at 115,200 baud; this design turns them into an edge image on a
// 640 x 480, 60 Hz VGA monitor.  The processes, linked by request/grant
// handshakes or one-clock strobes, are:
//   cam_cmd -> uart_tx      ask the camera for a frame ("DF\r"), again after
//                           every frame end
//   uart_rx -> cam_parser   bytes -> pixels with row/column, trimmed to
//                           80 x 120; frame-end token
//   sobel_engine            two-column input buffer, 3x3 window sliding down
//                           the column, |Gx|+|Gy| per colour plane,
//                           comparison with that plane's threshold
//   adaptive_threshold x3   threshold = mean |G| of the last frame times the
//                           user factor
//   rotary_encoder          user factor from the knob
//   lcd_controller          knob instructions and the factor on the
//                           2 x 16 character LCD
//   frame_buffer            80 x 120 x 12-bit image, written by column
//   vga_controller          read by row, each pixel shown as 8 x 4 screen
//                           pixels, RGB444 out
// Everything runs from the 50 MHz board clock `clk`; the VGA pixel rate is
// a clock enable.  `rst` is synchronous and active high.  Image processing
// is paced by the camera (about 4,800 pixels per second); the display
// refreshes continuously from the frame buffer.  `led` shows the user
// factor, `thr_r/g/b` the thresholds in use, for a status display;
// lcd_* drive a 4-bit HD44780-type character module.
// The system structure follows the described platform; the clocking,
// reset and the status outputs are this design's choices.
module edge_detector_top
  import edge_pkg::*;
#(
  parameter int CLKS_PER_BIT = 434,
  parameter int COLS         = 80,
  parameter int ROWS         = 120,
  parameter int CAM_ROWS     = 143,
  parameter int TRIM_TOP     = 11,
  parameter int HREP         = 8,
  parameter int VREP         = 4,
  parameter int DEBOUNCE     = 50000,
  parameter int LCD_POWERON_CLKS = 750_000,
  parameter int LCD_INIT_CLKS    = 205_000,
  parameter int LCD_CMD_CLKS     = 2_000,
  parameter int LCD_CLEAR_CLKS   = 82_000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cam_rx,
  output logic             cam_tx,
  input  logic             rot_a,
  input  logic             rot_b,
  input  logic             rot_press,
  output logic [3:0]       vga_r,
  output logic [3:0]       vga_g,
  output logic [3:0]       vga_b,
  output logic             vga_hs,
  output logic             vga_vs,
  output logic [7:0]       led,
  output logic [THR_W-1:0] thr_r,
  output logic [THR_W-1:0] thr_g,
  output logic [THR_W-1:0] thr_b,
  output logic             lcd_e,
  output logic             lcd_rs,
  output logic             lcd_rw,
  output logic [3:0]       lcd_d
);
  // camera command path
  logic       tx_req, tx_gnt, tx_busy;
  logic [7:0] tx_data;
  // camera receive path
  logic [7:0] rx_data;
  logic       rx_valid, rx_ferr;
  logic       tok_req, tok_gnt, frame_done, overrun;
  token_t     tok;
  // Sobel and thresholds
  logic                   grad_valid, frame_end;
  logic [2:0][GRAD_W-1:0] grad;
  logic [2:0][THR_W-1:0]  thr;
  logic [2:0][GRAD_W-1:0] seed;
  logic [2:0]             thr_busy;
  logic [FAC_W-1:0]       factor;
  // frame buffer
  logic             fb_we;
  logic [FB_AW-1:0] fb_waddr, fb_raddr;
  rgb12_t           fb_wdata, fb_rdata;
  logic             pix_tick, vga_frame_start;

  cam_cmd u_cmd (
    .clk, .rst, .frame_done,
    .tx_req, .tx_data, .tx_gnt
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .req(tx_req), .data(tx_data), .gnt(tx_gnt), .busy(tx_busy), .tx(cam_tx)
  );

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rx(cam_rx), .data(rx_data), .valid(rx_valid), .frame_err(rx_ferr)
  );

  cam_parser #(.CAM_ROWS(CAM_ROWS), .ROWS(ROWS), .COLS(COLS), .TRIM_TOP(TRIM_TOP)) u_parse (
    .clk, .rst, .in_valid(rx_valid), .in_data(rx_data),
    .tok_req, .tok, .tok_gnt, .frame_done, .overrun
  );

  sobel_engine #(.COLS(COLS), .ROWS(ROWS)) u_sobel (
    .clk, .rst, .tok_req, .tok, .tok_gnt, .hold(|thr_busy), .thr,
    .grad_valid, .grad, .frame_end, .fb_we, .fb_waddr, .fb_wdata
  );

  for (genvar k = 0; k < 3; k++) begin : g_thr
    adaptive_threshold u_thr (
      .clk, .rst, .grad_valid, .grad(grad[k]), .frame_end, .factor,
      .busy(thr_busy[k]), .seed(seed[k]), .thr(thr[k])
    );
  end

  rotary_encoder #(.DEBOUNCE(DEBOUNCE)) u_rot (
    .clk, .rst, .rot_a, .rot_b, .press(rot_press), .factor
  );

  lcd_controller #(
    .POWERON_CLKS(LCD_POWERON_CLKS), .INIT_CLKS(LCD_INIT_CLKS),
    .CMD_CLKS(LCD_CMD_CLKS), .CLEAR_CLKS(LCD_CLEAR_CLKS)
  ) u_lcd (
    .clk, .rst, .factor, .lcd_e, .lcd_rs, .lcd_rw, .lcd_d
  );

  frame_buffer #(.DEPTH(COLS * ROWS), .WIDTH(12), .AW(FB_AW)) u_fb (
    .clk, .we(fb_we), .waddr(fb_waddr), .wdata(fb_wdata),
    .raddr(fb_raddr), .rdata(fb_rdata)
  );

  vga_controller #(.COLS(COLS), .ROWS(ROWS), .HREP(HREP), .VREP(VREP)) u_vga (
    .clk, .rst, .fb_raddr, .fb_rdata,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs,
    .pix_tick, .frame_start(vga_frame_start)
  );

  assign led   = factor;
  assign thr_r = thr[0];
  assign thr_g = thr[1];
  assign thr_b = thr[2];
endmodule
