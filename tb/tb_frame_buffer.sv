// tb_frame_buffer: checks the image RAM at its full 80x120 size.
//
// Writes every word in column order (as the Sobel process does) while
// reading in row order (as the VGA controller does), then reads all words
// back; checks each read, one clock after its address, against a model.
// Also checks that an address beyond the image writes nothing.
module tb_frame_buffer;
  localparam int COLS = 80, ROWS = 120, DEPTH = COLS * ROWS;
  logic clk = 0, we = 0;
  logic [13:0] waddr = 0, raddr = 0;
  logic [11:0] wdata = 0, rdata;
  logic [11:0] model [DEPTH];
  bit          known [DEPTH];
  int checks = 0, failures = 0;

  frame_buffer dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = !clk;

  // compare each read with the model value of the previous clock's address
  logic [13:0] raddr_q;
  logic [11:0] exp_q;
  bit          exp_ok = 0;
  always @(posedge clk) begin
    if (exp_ok) begin
      checks++;
      if (rdata != exp_q) begin failures++; $display("FAIL addr %0d read %h expected %h", raddr_q, rdata, exp_q); end
    end
    raddr_q <= raddr;
    exp_ok  <= int'(raddr) < DEPTH && known[raddr];
    exp_q   <= (int'(raddr) < DEPTH) ? model[raddr] : '0;
    if (we && int'(waddr) < DEPTH) begin model[waddr] <= wdata; known[waddr] <= 1; end
  end

  initial begin
    int n = 0;
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++) begin
        we <= 1; waddr <= 14'(r * COLS + c); wdata <= 12'($urandom);
        raddr <= 14'(n % DEPTH); n++;
        @(posedge clk);
      end
    we <= 0;
    for (int a = 0; a < DEPTH; a++) begin raddr <= 14'(a); @(posedge clk); end
    we <= 1; waddr <= 14'(DEPTH); wdata <= 12'hABC; @(posedge clk); we <= 0;
    for (int a = 0; a < DEPTH; a++) begin raddr <= 14'(a); @(posedge clk); end
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
