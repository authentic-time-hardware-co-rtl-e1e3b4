// tb_cam_parser: checks stream decoding, trimming and the token handshake.
//
// Uses a small camera image (5 columns of 9 pixels, trimmed to 4 columns of
// rows 2..7).  Sends text outside a frame, then frames whose bytes come at
// random intervals, grants tokens after random delays, and checks every
// token (kind, row, column, colour) and the frame-end strobe against a model
// of the trimming rule.  Finally it withholds the grant to force an overrun.
module tb_cam_parser;
  import edge_pkg::*;
  localparam int CAM_ROWS = 9, ROWS = 6, COLS = 4, TRIM = 2, CAM_COLS = 5;
  logic clk = 0, rst = 1, in_valid = 0, tok_gnt = 0, gnt_en = 1;
  logic [7:0] in_data = 0;
  logic tok_req, frame_done, overrun;
  token_t tok;
  int checks = 0, failures = 0, ndone = 0;
  token_t expq [$];

  cam_parser #(.CAM_ROWS(CAM_ROWS), .ROWS(ROWS), .COLS(COLS), .TRIM_TOP(TRIM)) dut (
    .clk, .rst, .in_valid, .in_data, .tok_req, .tok, .tok_gnt, .frame_done, .overrun);

  always #5 clk = !clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    tok_gnt <= 0;
    if (gnt_en && tok_req && !tok_gnt && $urandom_range(0, 2) == 0) tok_gnt <= 1;
    if (tok_req && tok_gnt) begin
      check(expq.size() > 0, "unexpected token");
      if (expq.size() > 0) begin
        check(tok == expq[0], $sformatf("token %h expected %h", tok, expq[0]));
        void'(expq.pop_front());
      end
    end
    if (frame_done && !rst) ndone++;
  end

  task automatic send(input logic [7:0] b);
    in_valid <= 1; in_data <= b; @(posedge clk);
    in_valid <= 0; repeat ($urandom_range(8, 14)) @(posedge clk);
  endtask

  task automatic frame();
    token_t t;
    send(8'd1);
    for (int c = 0; c < CAM_COLS; c++) begin
      send(8'd2);
      for (int r = 0; r < CAM_ROWS; r++) begin
        rgb24_t p = '{r: 8'($urandom_range(16, 240)), g: 8'($urandom_range(16, 240)), b: 8'($urandom_range(16, 240))};
        if (c < COLS && r >= TRIM && r < TRIM + ROWS) begin
          t = '0; t.kind = TOK_PIXEL; t.row = 8'(r - TRIM); t.col = 7'(c); t.pix = p;
          expq.push_back(t);
        end
        send(p.r); send(p.g); send(p.b);
      end
    end
    t = '0; t.kind = TOK_FRAME_END; expq.push_back(t);
    send(8'd3);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    send(8'h41); send(8'h43); send(8'h4B); send(8'h0D); send(8'd3); send(8'd2); send(8'h55);
    check(expq.size() == 0 && ndone == 0, "bytes outside a frame ignored");
    for (int f = 0; f < 3; f++) begin
      frame();
      repeat (50) @(posedge clk);
      check(expq.size() == 0, $sformatf("frame %0d: %0d tokens missing", f, expq.size()));
      check(ndone == f + 1, "frame_done strobe");
      send(8'h3A);  // prompt character between frames
    end
    check(!overrun, "no overrun at byte rate");
    gnt_en = 0;
    send(8'd1); send(8'd2);
    for (int r = 0; r < TRIM + 2; r++) begin send(8'd20); send(8'd30); send(8'd40); end
    check(overrun, "overrun flagged when tokens are not taken");
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
