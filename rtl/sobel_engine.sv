// sobel_engine: input column buffer and Sobel edge process.
//
// The camera delivers the image column by column, so the 3x3 Sobel window
// slides down a column.  The input buffer holds only the two previous
// columns: word r of a ROWS-deep RAM is {P(r,c-1), P(r,c-2)}, 48 bits.  For
// each pixel token P(r,c) the process
//   1. grants the token (IDLE),
//   2. reads word r of the column RAM (RD),
//   3. shifts the window up one row, loading its bottom row with
//      P(r,c-2), P(r,c-1), P(r,c), and writes {P(r,c), P(r,c-1)} back to
//      word r (SHIFT),
//   4. computes |Gx|+|Gy| on the red, green and blue planes for the window
//      centred on (r-1,c-1), compares each with its plane's threshold
//      (edge when the gradient is greater) and, one clock later, writes the
//      RGB444 edge pixel to frame-buffer address (r-1)*COLS + (c-1) and
//      presents the three gradients to the threshold units (CALC).
// A pixel thus takes four clocks; a window exists only for r >= 2 and
// c >= 2, so the image border gets no output.  A frame-end token produces a
// one-clock `frame_end` strobe after the last pixel's gradients.  While
// `hold` is high (the thresholds are being recomputed), and in the clock of
// the `frame_end` strobe itself, no token is granted.
// Output colour: each 4-bit channel is 15 on an edge of that plane, else 0.
// Column-wise masking with a partial input buffer, per-plane gradients and
// thresholds follow the described design; the RAM layout, the four-step
// schedule, strict comparison and the output colouring are this design's.
module sobel_engine
  import edge_pkg::*;
#(
  parameter int COLS = 80,
  parameter int ROWS = 120
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        tok_req,
  input  token_t                      tok,
  output logic                        tok_gnt,
  input  logic                        hold,
  input  logic [2:0][THR_W-1:0]       thr,        // [0] red, [1] green, [2] blue
  output logic                        grad_valid,
  output logic [2:0][GRAD_W-1:0]      grad,       // [0] red, [1] green, [2] blue
  output logic                        frame_end,
  output logic                        fb_we,
  output logic [FB_AW-1:0]            fb_waddr,
  output rgb12_t                      fb_wdata
);
  typedef enum logic [1:0] {IDLE, RD, SHIFT, CALC} state_e;
  localparam int RAW = $clog2(ROWS);

  state_e             state;
  token_t             cur;
  rgb24_t             colmem [ROWS][2];  // [r][0] = P(r,c-1), [r][1] = P(r,c-2)
  rgb24_t             rd_c1, rd_c2;
  rgb24_t             w [3][3];          // [row][col], row 2 = newest
  logic [2:0][2:0][2:0][7:0] plane;      // [colour][row][col]
  logic [2:0][GRAD_W-1:0]    mag;

  assign tok_gnt = (state == IDLE) && tok_req && !hold && !frame_end;

  // Column RAM: registered read, write of the same word two clocks later.
  always_ff @(posedge clk) begin
    if (state == RD) begin
      rd_c1 <= colmem[RAW'(cur.row)][0];
      rd_c2 <= colmem[RAW'(cur.row)][1];
    end
    if (state == SHIFT) begin
      colmem[RAW'(cur.row)][0] <= cur.pix;
      colmem[RAW'(cur.row)][1] <= rd_c1;
    end
  end

  always_comb begin
    for (int rr = 0; rr < 3; rr++)
      for (int cc = 0; cc < 3; cc++) begin
        plane[0][rr][cc] = w[rr][cc].r;
        plane[1][rr][cc] = w[rr][cc].g;
        plane[2][rr][cc] = w[rr][cc].b;
      end
  end

  for (genvar k = 0; k < 3; k++) begin : g_plane
    sobel_grad u_grad (.win(plane[k]), .mag(mag[k]));
  end

  wire win_ok = (cur.row >= ROW_W'(2)) && (cur.col >= COL_W'(2));

  always_ff @(posedge clk) begin
    grad_valid <= 1'b0;
    fb_we      <= 1'b0;
    frame_end  <= 1'b0;
    if (rst) begin
      state    <= IDLE;
      cur      <= '0;
      grad     <= '0;
      fb_waddr <= '0;
      fb_wdata <= '0;
      for (int rr = 0; rr < 3; rr++)
        for (int cc = 0; cc < 3; cc++) w[rr][cc] <= '0;
    end else begin
      case (state)
        IDLE: if (tok_gnt) begin
          cur <= tok;
          if (tok.kind == TOK_FRAME_END) frame_end <= 1'b1;
          else                           state     <= RD;
        end
        RD: state <= SHIFT;
        SHIFT: begin
          for (int cc = 0; cc < 3; cc++) begin
            w[0][cc] <= w[1][cc];
            w[1][cc] <= w[2][cc];
          end
          w[2][0] <= rd_c2;
          w[2][1] <= rd_c1;
          w[2][2] <= cur.pix;
          state   <= CALC;
        end
        CALC: begin
          if (win_ok) begin
            grad_valid <= 1'b1;
            grad       <= mag;
            fb_we      <= 1'b1;
            fb_waddr   <= FB_AW'((int'(cur.row) - 1) * COLS + (int'(cur.col) - 1));
            fb_wdata.r <= (GRAD_W+4)'(mag[0]) > thr[0] ? 4'hF : 4'h0;
            fb_wdata.g <= (GRAD_W+4)'(mag[1]) > thr[1] ? 4'hF : 4'h0;
            fb_wdata.b <= (GRAD_W+4)'(mag[2]) > thr[2] ? 4'hF : 4'h0;
          end
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_row: assert property (@(posedge clk) disable iff (rst)
                          tok_gnt && tok.kind == TOK_PIXEL |-> int'(tok.row) < ROWS);
endmodule
