// tb_uart_tx: checks the transmitter's serial frames and its handshake.
//
// Offers random bytes through request/grant with random gaps, decodes the
// line in the middle of each bit, and checks data, start and stop bits
// and that no grant is given while busy.
module tb_uart_tx;
  localparam int CPB = 12;
  logic clk = 0, rst = 1, req = 0;
  logic [7:0] data = 0;
  logic gnt, busy, tx;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .req, .data, .gnt, .busy, .tx);

  always #5 clk = !clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // sender
  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      automatic int gap = $urandom_range(0, 30);
      // req drops only when there is a gap, so it is never written twice
      // in one time step
      if (gap > 0) begin
        req <= 0;
        repeat (gap) @(posedge clk);
      end
      req  <= 1;
      data <= 8'($urandom);
      // sample the combinational grant away from the active edge
      @(negedge clk);
      while (!gnt) @(negedge clk);
      sent.push_back(data);
      @(posedge clk);
    end
    req <= 0;
  end

  // line decoder
  initial begin
    int n = 0;
    logic [7:0] b;
    longint t0;
    wait (!rst);
    while (n < 200) begin
      @(negedge tx);
      t0 = $time;
      repeat (CPB / 2) @(posedge clk);
      check(tx == 0, "start bit");
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx; end
      repeat (CPB) @(posedge clk);
      check(tx == 1, "stop bit");
      check(sent.size() > 0 && b == sent[0], $sformatf("byte %0d got %h", n, b));
      if (sent.size() > 0) void'(sent.pop_front());
      n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && busy) begin
    checks++;
    if (gnt) begin failures++; $display("FAIL grant while busy"); end
  end

  initial begin
    repeat (200 * 11 * CPB + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
