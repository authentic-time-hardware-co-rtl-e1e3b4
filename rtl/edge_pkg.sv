// edge_pkg: types and constants shared by the video edge detector.
//
// The camera sends a frame column by column as a byte stream in which the
// values 1, 2 and 3 mark frame start, new column and frame end, and every
// other byte is a colour value (red, green, blue in turn).  Pixels travel
// through the design as 24-bit RGB, the VGA output is 12-bit RGB444.
// The marker values and the 24/12-bit colour widths follow the described
// system; the token layout and the field widths are this design's own.
package edge_pkg;

  // Stream markers of the camera's raw frame dump.
  localparam logic [7:0] MARK_FRAME_START = 8'd1;
  localparam logic [7:0] MARK_NEW_COLUMN  = 8'd2;
  localparam logic [7:0] MARK_FRAME_END   = 8'd3;

  // Widths of positions and of the Sobel arithmetic.
  localparam int ROW_W  = 8;   // up to 255 rows per column (camera gives 143)
  localparam int COL_W  = 7;   // up to 127 columns (camera gives 80)
  localparam int GRAD_W = 11;  // |Gx|+|Gy| <= 2*4*255 = 2040
  localparam int THR_W  = 15;  // seed (11 bits) * factor (8 bits) >> 4
  localparam int FAC_W  = 8;   // user factor, 4 fraction bits
  localparam int FAC_FRAC = 4;
  localparam int FB_AW  = 14;  // frame buffer address, 80*120 = 9600 words

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb24_t;

  typedef struct packed {
    logic [3:0] r;
    logic [3:0] g;
    logic [3:0] b;
  } rgb12_t;

  typedef enum logic [0:0] {
    TOK_PIXEL     = 1'b0,
    TOK_FRAME_END = 1'b1
  } tok_kind_e;

  // One item handed from the stream parser to the Sobel process.
  typedef struct packed {
    tok_kind_e        kind;
    logic [ROW_W-1:0] row;  // row inside the trimmed image, 0 = top
    logic [COL_W-1:0] col;  // column, 0 = first column sent
    rgb24_t           pix;
  } token_t;

endpackage
