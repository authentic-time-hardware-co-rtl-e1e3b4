// sobel_grad: Sobel gradient magnitude of one colour plane.
//
// Combinational.  From a 3x3 window w[row][col] of 8-bit samples (row 0 on
// top, col 0 on the left, centre w[1][1]) it forms
//   Gx = (w[0][2] + 2 w[1][2] + w[2][2]) - (w[0][0] + 2 w[1][0] + w[2][0])
//   Gy = (w[0][0] + 2 w[0][1] + w[0][2]) - (w[2][0] + 2 w[2][1] + w[2][2])
// which are the two Sobel masks (right minus left, top minus bottom), and
// returns the approximation |G| = |Gx| + |Gy| (at most 2040, 11 bits).
// Masks and magnitude approximation follow the described algorithm.
module sobel_grad (
  input  logic [2:0][2:0][7:0] win,
  output logic [10:0]          mag
);
  logic signed [11:0] gx, gy;
  logic        [10:0] ax, ay;

  function automatic logic signed [11:0] s(input logic [7:0] v);
    return $signed({4'b0, v});
  endfunction

  always_comb begin
    gx = (s(win[0][2]) + (s(win[1][2]) <<< 1) + s(win[2][2]))
       - (s(win[0][0]) + (s(win[1][0]) <<< 1) + s(win[2][0]));
    gy = (s(win[0][0]) + (s(win[0][1]) <<< 1) + s(win[0][2]))
       - (s(win[2][0]) + (s(win[2][1]) <<< 1) + s(win[2][2]));
    ax  = gx[11] ? 11'(-gx) : 11'(gx);
    ay  = gy[11] ? 11'(-gy) : 11'(gy);
    mag = ax + ay;
  end
endmodule
