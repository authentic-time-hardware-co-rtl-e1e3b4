// frame_buffer: dual-port RAM holding the processed image.
//
// DEPTH words of WIDTH bits (default 80 x 120 pixels of RGB444 = 9600 x 12
// bits, about a third of the FPGA's block RAM).  The Sobel process writes
// it column by column through the write port; the VGA controller reads it
// row by row through the read port, whose output is registered (data one
// clock after the address).  A word is at address row*80 + column.  The
// contents are not cleared by reset.  Size and the column-write/row-read use
// follow the described system; the address layout is this design's.
module frame_buffer #(
  parameter int DEPTH = 9600,
  parameter int WIDTH = 12,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
