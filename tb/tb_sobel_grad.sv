// tb_sobel_grad: checks the Sobel magnitude against an integer model.
//
// Drives random 3x3 windows plus the extreme cases (flat, full-scale step in
// x, in y and a diagonal) and compares |Gx|+|Gy| with a reference computed
// directly from the two masks.
module tb_sobel_grad;
  logic [2:0][2:0][7:0] win;
  logic [10:0]          mag;
  int checks = 0, failures = 0;

  sobel_grad dut (.win, .mag);

  function automatic int ref_mag(input logic [2:0][2:0][7:0] w);
    int gx, gy;
    gx = (int'(w[0][2]) + 2*int'(w[1][2]) + int'(w[2][2])) - (int'(w[0][0]) + 2*int'(w[1][0]) + int'(w[2][0]));
    gy = (int'(w[0][0]) + 2*int'(w[0][1]) + int'(w[0][2])) - (int'(w[2][0]) + 2*int'(w[2][1]) + int'(w[2][2]));
    return (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
  endfunction

  task automatic check();
    #1;
    checks++;
    if (int'(mag) != ref_mag(win)) begin
      failures++;
      $display("FAIL win=%h mag=%0d expected %0d", win, mag, ref_mag(win));
    end
  endtask

  initial begin
    win = '0;                       check();
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = (c == 2) ? 8'd255 : 8'd0;
    check();                        // pure x step: 4*255
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = (r == 2) ? 8'd255 : 8'd0;
    check();                        // pure y step, negative Gy
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = (c == 0 && r == 2) ? 8'd0 : ((c==0||r==2) ? 8'd0 : 8'd255);
    check();
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = (c == 2 || r == 0) ? 8'd255 : 8'd0;
    check();
    for (int i = 0; i < 5000; i++) begin
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = 8'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
