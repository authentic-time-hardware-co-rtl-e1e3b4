// tb_cam_cmd: checks the dump-frame command sequence.
//
// Grants each request after a random delay and checks that reset is
// followed by exactly 'D' 'F' CR, that nothing more is sent until a frame
// end, that each frame end (also one arriving mid-command) gives one more
// command, and that an offered byte stays stable until granted.
module tb_cam_cmd;
  logic clk = 0, rst = 1, frame_done = 0, tx_gnt = 0;
  logic tx_req;
  logic [7:0] tx_data;
  int checks = 0, failures = 0;
  logic [7:0] got [$];

  cam_cmd dut (.clk, .rst, .frame_done, .tx_req, .tx_data, .tx_gnt);

  always #5 clk = !clk;

  // granting side
  always @(posedge clk) begin
    tx_gnt <= 0;
    if (tx_req && !tx_gnt && ($urandom_range(0, 3) == 0)) tx_gnt <= 1;
    if (tx_req && tx_gnt) got.push_back(tx_data);
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic expect_cmds(input int n);
    check(got.size() == 3 * n, $sformatf("%0d bytes, expected %0d", got.size(), 3 * n));
    for (int i = 0; i < got.size(); i++)
      check(got[i] == (i % 3 == 0 ? 8'h44 : i % 3 == 1 ? 8'h46 : 8'h0D), $sformatf("byte %0d = %h", i, got[i]));
    got.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (100) @(posedge clk);
    expect_cmds(1);
    repeat (100) @(posedge clk);
    expect_cmds(0);
    for (int k = 0; k < 5; k++) begin
      frame_done <= 1; @(posedge clk); frame_done <= 0;
      repeat (100) @(posedge clk);
      expect_cmds(1);
    end
    // frame end while a command is in progress
    frame_done <= 1; @(posedge clk); frame_done <= 0;
    repeat (2) @(posedge clk);
    frame_done <= 1; @(posedge clk); frame_done <= 0;
    repeat (200) @(posedge clk);
    expect_cmds(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && $past(tx_req) && !$past(tx_gnt)) begin
    checks++;
    if (!tx_req || tx_data != $past(tx_data)) begin failures++; $display("FAIL request dropped"); end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
