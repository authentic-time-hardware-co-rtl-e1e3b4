// tb_uart_rx: checks the receiver with bytes sent by a bit-level model.
//
// Runs at 32 clocks per bit.  Sends random bytes with random idle gaps and
// a baud rate off by up to +-3 %, checks each received byte, that `valid`
// comes once per byte and roughly 9.5 bit times after the start edge, that
// a missing stop bit raises `frame_err`, and that a short low glitch is not
// taken for a start bit.
module tb_uart_rx;
  localparam int CPB = 32;
  logic clk = 0, rst = 1, rx = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  int nvalid = 0;
  logic [7:0] last;
  logic last_ferr;
  longint t_start, t_valid;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rx, .data, .valid, .frame_err);

  always #5 clk = !clk;
  always @(posedge clk) if (valid) begin
    nvalid++; last = data; last_ferr = frame_err; t_valid = $time / 10;
  end

  task automatic send(input logic [7:0] b, input int cpb, input logic stop);
    t_start = $time / 10;
    rx = 0; repeat (cpb) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (cpb) @(posedge clk); end
    rx = stop; repeat (cpb) @(posedge clk);
    rx = 1;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic int cpb = CPB + (i % 3) - 1;     // 31, 32, 33 clocks per bit
      automatic int n0 = nvalid;
      send(b, cpb, 1'b1);
      repeat (12) @(posedge clk);
      check(nvalid == n0 + 1, "one valid per byte");
      check(last == b, $sformatf("byte %0d: got %h expected %h", i, last, b));
      check(!last_ferr, "no framing error");
      check(t_valid - t_start >= 9 * CPB && t_valid - t_start <= 10 * CPB + 4, $sformatf("latency %0d", t_valid - t_start));
      repeat ($urandom_range(0, 40)) @(posedge clk);
    end
    // missing stop bit
    send(8'hA5, CPB, 1'b0);
    repeat (3) @(posedge clk);
    check(last == 8'hA5 && last_ferr, "framing error flagged");
    repeat (2 * CPB) @(posedge clk);
    // glitch shorter than half a bit
    begin
      automatic int n0 = nvalid;
      rx = 0; repeat (CPB / 4) @(posedge clk); rx = 1;
      repeat (20 * CPB) @(posedge clk);
      check(nvalid == n0, "glitch ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
