// tb_sobel_engine: checks the column buffer, the window and the edge output.
//
// Streams two random 6x5 frames column by column as pixel tokens, each
// followed by a frame-end token, with per-plane thresholds that change per
// frame.  A reference model computes, for every interior pixel, the Sobel
// magnitude of each plane and the RGB444 edge pixel; the testbench checks
// every frame-buffer write (address and data), every gradient output, that
// nothing is written for border pixels, the frame-end strobe, that a pixel
// takes 4 clocks from grant to grant and its result appears 4 clocks after
// its grant, and that no token is granted while `hold` is high.
module tb_sobel_engine;
  import edge_pkg::*;
  localparam int COLS = 6, ROWS = 5;
  logic clk = 0, rst = 1, tok_req = 0, hold = 0;
  token_t tok = '0;
  logic tok_gnt, grad_valid, frame_end, fb_we;
  logic [2:0][THR_W-1:0] thr;
  logic [2:0][GRAD_W-1:0] grad;
  logic [FB_AW-1:0] fb_waddr;
  rgb12_t fb_wdata;
  int checks = 0, failures = 0;
  rgb24_t img [COLS][ROWS];
  typedef struct { int addr; logic [11:0] data; int g[3]; } exp_t;
  exp_t expq [$];
  longint last_gnt = -1, gnt_time = -1, cyc = 0;
  int n_fe = 0, hold_blocks = 0;
  bit hold_window = 0;
  bit prev_pixel = 0, req_gap = 1;

  sobel_engine #(.COLS(COLS), .ROWS(ROWS)) dut (
    .clk, .rst, .tok_req, .tok, .tok_gnt, .hold, .thr, .grad_valid, .grad,
    .frame_end, .fb_we, .fb_waddr, .fb_wdata);

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int chan(input rgb24_t p, input int k);
    return k == 0 ? int'(p.r) : k == 1 ? int'(p.g) : int'(p.b);
  endfunction

  // reference magnitude at centre (r, c) for plane k
  function automatic int ref_grad(input int c, input int r, input int k);
    int gx, gy;
    gx = chan(img[c+1][r-1],k) + 2*chan(img[c+1][r],k) + chan(img[c+1][r+1],k)
       - chan(img[c-1][r-1],k) - 2*chan(img[c-1][r],k) - chan(img[c-1][r+1],k);
    gy = chan(img[c-1][r-1],k) + 2*chan(img[c][r-1],k) + chan(img[c+1][r-1],k)
       - chan(img[c-1][r+1],k) - 2*chan(img[c][r+1],k) - chan(img[c+1][r+1],k);
    return (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
  endfunction

  always @(posedge clk) if (!rst) begin
    if (fb_we) begin
      check(expq.size() > 0, "unexpected write");
      if (expq.size() > 0) begin
        check(int'(fb_waddr) == expq[0].addr, $sformatf("addr %0d expected %0d", fb_waddr, expq[0].addr));
        check(fb_wdata == expq[0].data, $sformatf("data %h expected %h at %0d", fb_wdata, expq[0].data, expq[0].addr));
        check(grad_valid, "grad_valid with write");
        for (int k = 0; k < 3; k++)
          check(int'(grad[k]) == expq[0].g[k], $sformatf("grad[%0d] %0d expected %0d", k, grad[k], expq[0].g[k]));
        check(cyc - gnt_time == 4, $sformatf("result %0d clocks after grant", cyc - gnt_time));
        void'(expq.pop_front());
      end
    end else check(!grad_valid, "grad_valid without write");
    if (frame_end) begin
      n_fe++;
      check(expq.size() == 0, "frame_end after last result");
    end
    if (tok_gnt) begin
      check(!hold, "grant while hold");
      // back-to-back pixels: one grant every 4 clocks
      if (last_gnt >= 0 && prev_pixel && !req_gap)
        check(cyc - last_gnt == 4, $sformatf("grant interval %0d", cyc - last_gnt));
      last_gnt = cyc;
      prev_pixel = tok.kind == TOK_PIXEL;
      req_gap = 0;
      gnt_time = cyc;
    end
    else if (!tok_req || hold) req_gap = 1;
    if (hold && tok_req) hold_blocks++;
  end


  task automatic offer(input token_t t);
    tok_req <= 1; tok <= t;
    // sample the combinational grant away from the active edge
    @(negedge clk);
    while (!tok_gnt) @(negedge clk);
    @(posedge clk);
  endtask

  task automatic run_frame(input int f);
    token_t t;
    for (int k = 0; k < 3; k++) thr[k] = THR_W'($urandom_range(100, 900));
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++)
        img[c][r] = '{r: 8'($urandom), g: 8'($urandom), b: 8'($urandom)};
    // make part of the image flat so that gradients below threshold occur
    for (int r = 0; r < ROWS; r++) img[0][r] = img[1][r];
    for (int c = 0; c < COLS; c++) begin
      for (int r = 0; r < ROWS; r++) begin
        if (r >= 2 && c >= 2) begin
          exp_t e;
          e.addr = (r - 1) * COLS + (c - 1);
          for (int k = 0; k < 3; k++) e.g[k] = ref_grad(c - 1, r - 1, k);
          e.data = {e.g[0] > int'(thr[0]) ? 4'hF : 4'h0,
                    e.g[1] > int'(thr[1]) ? 4'hF : 4'h0,
                    e.g[2] > int'(thr[2]) ? 4'hF : 4'h0};
          expq.push_back(e);
        end
        t = '0; t.kind = TOK_PIXEL; t.row = 8'(r); t.col = 7'(c); t.pix = img[c][r];
        hold_window = 0;
        if (f == 1 && c == 3 && r == 2) begin
          // hold the engine off for a while with a token waiting
          hold <= 1; hold_window = 1;
          fork begin repeat (20) @(posedge clk); hold <= 0; end join_none
        end
        offer(t);
        if (hold_window) check(hold_blocks >= 15, "token waited during hold");
      end
    end
    t = '0; t.kind = TOK_FRAME_END;
    offer(t);
    tok_req <= 0;
    repeat (10) @(posedge clk);
    check(n_fe == f + 1, "frame_end strobe");
    check(expq.size() == 0, "all results seen");
  endtask

  initial begin
    thr = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run_frame(0);
    run_frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
