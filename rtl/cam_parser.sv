// cam_parser: decoder of the camera's raw frame dump.
//
// The camera sends a frame column by column:
//   1  c c c ... 2 c c c ... 2 ...  3
// where 1 starts a frame, 2 starts a new column, 3 ends the frame and each c
// is a colour byte (red, green, blue in turn, values 16..240, so a colour
// never equals a marker).  The parser counts columns and the pixels within a
// column, joins three colour bytes into a 24-bit pixel and keeps only rows
// TRIM_TOP .. TRIM_TOP+ROWS-1 of the CAM_ROWS-pixel column and the first
// COLS columns, which trims the 80x143 camera image to 80x120.  Each kept
// pixel, and the frame end, becomes a token for the Sobel process, offered
// by request/grant: `tok_req` and `tok` stay until `tok_gnt`.  Bytes outside
// a frame (the camera's command replies) are ignored.  If a token is ready
// while the previous one is still ungranted, the new one is dropped and the
// sticky `overrun` flag is set (the Sobel process needs a few clocks per
// pixel, the camera link delivers one every ~30,000, so this signals a fault).
// `frame_done` pulses when the frame-end marker arrives.
// Stream format and image sizes follow the described system; which rows are
// trimmed (a centre crop), the token form and the overrun rule are this
// design's choices.
module cam_parser
  import edge_pkg::*;
#(
  parameter int CAM_ROWS = 143,
  parameter int ROWS     = 120,
  parameter int COLS     = 80,
  parameter int TRIM_TOP = 11
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       tok_req,
  output token_t     tok,
  input  logic       tok_gnt,
  output logic       frame_done,
  output logic       overrun
);
  logic             in_frame;
  logic             col_open;   // at least one "new column" seen in this frame
  logic [COL_W:0]   col;        // one spare bit so it cannot wrap into range
  logic [ROW_W-1:0] row_raw;    // pixel index inside the camera column
  logic [1:0]       cidx;       // which colour comes next: 0 r, 1 g, 2 b
  logic [7:0]       r_q, g_q;

  logic   emit;
  token_t nxt;

  always_comb begin
    emit = 1'b0;
    nxt  = '0;
    if (in_valid) begin
      if (in_data == MARK_FRAME_END && in_frame) begin
        emit     = 1'b1;
        nxt.kind = TOK_FRAME_END;
      end else if (in_data != MARK_FRAME_START && in_data != MARK_NEW_COLUMN &&
                   in_data != MARK_FRAME_END && in_frame && col_open && cidx == 2'd2 &&
                   int'(row_raw) >= TRIM_TOP && int'(row_raw) < TRIM_TOP + ROWS &&
                   int'(col) < COLS && int'(row_raw) < CAM_ROWS) begin
        emit     = 1'b1;
        nxt.kind = TOK_PIXEL;
        nxt.row  = row_raw - ROW_W'(TRIM_TOP);
        nxt.col  = col[COL_W-1:0];
        nxt.pix  = '{r: r_q, g: g_q, b: in_data};
      end
    end
  end

  always_ff @(posedge clk) begin
    frame_done <= 1'b0;
    if (rst) begin
      in_frame <= 1'b0;
      col_open <= 1'b0;
      col      <= '0;
      row_raw  <= '0;
      cidx     <= '0;
      r_q      <= '0;
      g_q      <= '0;
      tok_req  <= 1'b0;
      tok      <= '0;
      overrun  <= 1'b0;
    end else begin
      if (tok_req && tok_gnt) tok_req <= 1'b0;
      if (emit) begin
        if (tok_req && !tok_gnt) overrun <= 1'b1;
        else begin
          tok_req <= 1'b1;
          tok     <= nxt;
        end
      end
      if (in_valid) begin
        case (in_data)
          MARK_FRAME_START: begin
            in_frame <= 1'b1;
            col_open <= 1'b0;
            col      <= '0;
          end
          MARK_NEW_COLUMN: if (in_frame) begin
            if (col_open && !(&col)) col <= col + 1'b1;
            col_open <= 1'b1;
            row_raw  <= '0;
            cidx     <= '0;
          end
          MARK_FRAME_END: if (in_frame) begin
            in_frame   <= 1'b0;
            frame_done <= 1'b1;
          end
          default: if (in_frame && col_open) begin
            case (cidx)
              2'd0:    begin r_q <= in_data; cidx <= 2'd1; end
              2'd1:    begin g_q <= in_data; cidx <= 2'd2; end
              default: begin
                cidx <= 2'd0;
                if (!(&row_raw)) row_raw <= row_raw + 1'b1;
              end
            endcase
          end
        endcase
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (rst)
                           tok_req && !tok_gnt |=> tok_req && $stable(tok));
endmodule
