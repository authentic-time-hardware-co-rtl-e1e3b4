// vga_controller: 640x480 VGA output of the 80x120 edge image.
//
// Runs from the 50 MHz clock with a pixel step every second clock (25 MHz
// pixel rate).  Horizontal and vertical counters walk the 800 x 525 raster
// of 640x480 at 60 Hz (active, front porch, sync, back porch = 640/16/96/48
// and 480/10/2/33; both syncs active low).  Alongside them, replication
// counters give the image position: each image pixel covers HREP = 8 screen
// pixels of a line and VREP = 4 lines, so 80x120 fills 640x480 (x2 corrects
// the camera's narrow pixels, x4 is the magnification).  The frame buffer
// address is row*COLS + column, with row*COLS kept as a running sum so no
// multiplier is needed; the buffer is read row by row although it was
// written column by column.  The border ring of the image, where the 3x3
// Sobel mask does not fit, and everything outside the image are black.
// Timing: the address for screen position P is presented while the counters
// sit on P; colour and syncs for P are registered on the next pixel step,
// so all outputs lag the counters by one pixel.  `pix_tick` marks the
// clocks on which the outputs change; `frame_start` pulses with the first
// active pixel of a frame.  Resolution, pixel rate, replication factors and
// 12-bit colour follow the described system; porch values are the usual
// ones for this mode; the rest is this design's choice.
module vga_controller
  import edge_pkg::*;
#(
  parameter int H_ACTIVE = 640,
  parameter int H_FP     = 16,
  parameter int H_SYNC   = 96,
  parameter int H_BP     = 48,
  parameter int V_ACTIVE = 480,
  parameter int V_FP     = 10,
  parameter int V_SYNC   = 2,
  parameter int V_BP     = 33,
  parameter int COLS     = 80,
  parameter int ROWS     = 120,
  parameter int HREP     = 8,
  parameter int VREP     = 4
) (
  input  logic             clk,
  input  logic             rst,
  output logic [FB_AW-1:0] fb_raddr,
  input  rgb12_t           fb_rdata,
  output logic [3:0]       vga_r,
  output logic [3:0]       vga_g,
  output logic [3:0]       vga_b,
  output logic             vga_hs,
  output logic             vga_vs,
  output logic             pix_tick,
  output logic             frame_start
);
  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int HW = $clog2(H_TOTAL);
  localparam int VW = $clog2(V_TOTAL);
  localparam int RW = $clog2(HREP > VREP ? HREP + 1 : VREP + 1);

  logic          div;       // toggles every clock; pixel step when set
  logic [HW-1:0] hcnt;
  logic [VW-1:0] vcnt;
  logic [RW-1:0] hrep, vrep;
  logic [COL_W:0] ix;
  logic [ROW_W:0] iy;
  logic [FB_AW-1:0] row_base;

  logic in_img, border, hs_c, vs_c;

  always_comb begin
    in_img = int'(hcnt) < H_ACTIVE && int'(vcnt) < V_ACTIVE &&
             int'(ix) < COLS && int'(iy) < ROWS;
    border = ix == '0 || int'(ix) == COLS - 1 || iy == '0 || int'(iy) == ROWS - 1;
    hs_c   = !(int'(hcnt) >= H_ACTIVE + H_FP && int'(hcnt) < H_ACTIVE + H_FP + H_SYNC);
    vs_c   = !(int'(vcnt) >= V_ACTIVE + V_FP && int'(vcnt) < V_ACTIVE + V_FP + V_SYNC);
  end

  assign fb_raddr = row_base + FB_AW'(ix);
  assign pix_tick = div;

  always_ff @(posedge clk) begin
    frame_start <= 1'b0;
    if (rst) begin
      div      <= 1'b0;
      hcnt     <= '0;
      vcnt     <= '0;
      hrep     <= '0;
      vrep     <= '0;
      ix       <= '0;
      iy       <= '0;
      row_base <= '0;
      vga_r    <= '0;
      vga_g    <= '0;
      vga_b    <= '0;
      vga_hs   <= 1'b1;
      vga_vs   <= 1'b1;
    end else begin
      div <= !div;
      if (div) begin
        // outputs for the position the counters leave now
        vga_hs <= hs_c;
        vga_vs <= vs_c;
        if (in_img && !border) begin
          vga_r <= fb_rdata.r;
          vga_g <= fb_rdata.g;
          vga_b <= fb_rdata.b;
        end else begin
          vga_r <= '0;
          vga_g <= '0;
          vga_b <= '0;
        end
        frame_start <= hcnt == '0 && vcnt == '0;
        // advance the raster
        if (int'(hcnt) == H_TOTAL - 1) begin
          hcnt <= '0;
          hrep <= '0;
          ix   <= '0;
          if (int'(vcnt) == V_TOTAL - 1) begin
            vcnt     <= '0;
            vrep     <= '0;
            iy       <= '0;
            row_base <= '0;
          end else begin
            vcnt <= vcnt + 1'b1;
            if (int'(vrep) == VREP - 1) begin
              vrep     <= '0;
              iy       <= iy + 1'b1;
              row_base <= row_base + FB_AW'(COLS);
            end else vrep <= vrep + 1'b1;
          end
        end else begin
          hcnt <= hcnt + 1'b1;
          if (int'(hrep) == HREP - 1) begin
            hrep <= '0;
            ix   <= ix + 1'b1;
          end else hrep <= hrep + 1'b1;
        end
      end
    end
  end
endmodule
