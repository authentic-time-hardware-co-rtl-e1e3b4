// edge_tb_body.svh: end-to-end test of edge_detector_top, shared by the
// reduced-size and the full-size testbench.
//
// The including module declares the localparams CPB, COLS, ROWS, CAM_ROWS,
// TRIM, DEB, NFRAMES and NDETENT, the DUT's ports as variables, and the
// DUT itself as `dut`.
//
// A camera model waits for the dump-frame command on cam_tx, answers with
// some text, then sends a frame (COLS columns of CAM_ROWS pixels) in the
// camera's column format over cam_rx.  Each frame is a pattern of flat
// tiles with a little noise, so it has strong edges, weak edges and flat
// areas.  An integer model trims the frame, computes the Sobel magnitudes,
// the per-plane mean (the next frame's seed) and the edge image with the
// thresholds of the previous frame.  After each frame the testbench checks
// the thresholds on thr_r/g/b and then one whole VGA frame, pixel by pixel,
// against the expected edge image magnified 8x4 with a black border.
// Before the last frame it turns the knob NDETENT detents, which changes
// the scale factor.  It counts how often each mechanism occurred: command
// sent, text outside a frame ignored, rows trimmed, threshold recomputed,
// edge and non-edge pixels written, factor changed, LCD refreshed; a
// mechanism that never occurred counts as a failure.  At the end it checks
// the text rebuilt from the LCD bus: the instruction line, and the factor
// shown in hex on line 2.

  int checks = 0, failures = 0, nerr = 0;
  int n_cmd = 0, n_ignored = 0, n_trimmed = 0, n_thr_update = 0;
  int n_edge = 0, n_flat = 0, n_factor = 0, n_pix_tok = 0, n_data_bytes = 0;
  int factor_model = 16;
  int seed_model [3] = '{0, 0, 0};
  logic [7:0]  cam   [COLS][CAM_ROWS][3];
  logic [11:0] exp_fb [ROWS][COLS];
  bit frame_checked = 1;
  logic [7:0] last_led = 8'd16;

  always #10 clk = !clk;   // 50 MHz

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (nerr++ < 30) $display("FAIL %s", what);
    end
  endtask

  // ---- observers of mechanisms inside the design ----
  logic busy_q = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.rx_valid && !dut.u_parse.in_frame && dut.rx_data != 8'd1) n_ignored++;
    if (dut.rx_valid && dut.u_parse.in_frame && dut.u_parse.col_open && dut.rx_data > 8'd3) n_data_bytes++;
    if (dut.tok_gnt && dut.tok.kind == edge_pkg::TOK_PIXEL) n_pix_tok++;
    busy_q <= |dut.thr_busy;
    if (|dut.thr_busy && !busy_q) n_thr_update++;
    if (dut.fb_we) begin
      if (dut.fb_wdata != 0) n_edge++;
      else n_flat++;
    end
    if (led != last_led) n_factor++;
    last_led <= led;
  end

  // ---- character LCD: rebuild the text from the 4-bit bus ----
  // The first four strobes are single init nibbles; after that nibbles pair
  // into bytes.  0x80 / 0xC0 select line 1 / line 2, rs=1 bytes are text.
  int n_lcd_strobe = 0, n_lcd_line2 = 0, lcd_line = 0;
  logic [3:0] lcd_hi = 0;
  logic lcd_e_q = 0;
  string lcd_text [2] = '{"", ""};
  string lcd_last2 = "";
  always @(posedge clk) if (!rst) begin
    lcd_e_q <= lcd_e;
    if (!lcd_e && lcd_e_q) begin
      check(!lcd_rw, "LCD is only written");
      n_lcd_strobe++;
      if (n_lcd_strobe > 4 && n_lcd_strobe % 2 == 1) lcd_hi = lcd_d;
      else if (n_lcd_strobe > 4) begin
        automatic logic [7:0] b = {lcd_hi, lcd_d};
        if (!lcd_rs) begin
          if (b == 8'h80) begin lcd_line = 0; lcd_text[0] = ""; end
          if (b == 8'hC0) begin lcd_line = 1; lcd_text[1] = ""; end
        end else begin
          lcd_text[lcd_line] = {lcd_text[lcd_line], string'(b)};
          if (lcd_line == 1 && lcd_text[1].len() == 16) begin
            n_lcd_line2++;
            lcd_last2 = lcd_text[1];
          end
        end
      end
    end
  end

  function automatic string hex_up(input logic [7:0] v);
    string digits = "0123456789ABCDEF";
    string r = "  ";
    r[0] = digits[v[7:4]];
    r[1] = digits[v[3:0]];
    return r;
  endfunction

  // ---- camera side: receive commands ----
  logic [7:0] cmd_hist [3];
  initial begin
    logic [7:0] b;
    cmd_hist = '{0, 0, 0};
    wait (!rst);
    forever begin
      @(negedge cam_tx);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = cam_tx; end
      repeat (CPB) @(posedge clk);
      cmd_hist = '{cmd_hist[1], cmd_hist[2], b};
      if (cmd_hist[0] == 8'h44 && cmd_hist[1] == 8'h46 && cmd_hist[2] == 8'h0D) n_cmd++;
    end
  end

  task automatic cam_send(input logic [7:0] b);
    cam_rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin cam_rx = b[i]; repeat (CPB) @(posedge clk); end
    cam_rx = 1; repeat (CPB) @(posedge clk);
  endtask

  function automatic int clamp(input int v);
    return v < 16 ? 16 : v > 240 ? 240 : v;
  endfunction

  task automatic make_frame(input int f);
    int tile [3][4][4];
    for (int k = 0; k < 3; k++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) tile[k][i][j] = $urandom_range(40, 220);
    // a flat strip at the left of frame 1 keeps some gradients at zero
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < CAM_ROWS; r++)
        for (int k = 0; k < 3; k++) begin
          int v = tile[k][(c * 4 / COLS) % 4][(r * 4 / CAM_ROWS) % 4] + $urandom_range(0, 12) - 6;
          if (k == f % 3 && c < COLS / 3) v = 100;
          cam[c][r][k] = 8'(clamp(v));
        end
  endtask

  // model of the Sobel process for one frame; updates the seeds
  task automatic model_frame();
    int sum [3] = '{0, 0, 0};
    int cnt = 0;
    int thr [3];
    for (int k = 0; k < 3; k++) thr[k] = (seed_model[k] * factor_model) >> 4;
    for (int r = 1; r < ROWS - 1; r++)
      for (int c = 1; c < COLS - 1; c++) begin
        logic [11:0] px = 0;
        for (int k = 0; k < 3; k++) begin
          int gx, gy, g;
          gx = int'(cam[c+1][r-1+TRIM][k]) + 2*int'(cam[c+1][r+TRIM][k]) + int'(cam[c+1][r+1+TRIM][k])
             - int'(cam[c-1][r-1+TRIM][k]) - 2*int'(cam[c-1][r+TRIM][k]) - int'(cam[c-1][r+1+TRIM][k]);
          gy = int'(cam[c-1][r-1+TRIM][k]) + 2*int'(cam[c][r-1+TRIM][k]) + int'(cam[c+1][r-1+TRIM][k])
             - int'(cam[c-1][r+1+TRIM][k]) - 2*int'(cam[c][r+1+TRIM][k]) - int'(cam[c+1][r+1+TRIM][k]);
          g = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
          sum[k] += g;
          if (g > thr[k]) px[11 - 4*k -: 4] = 4'hF;
        end
        cnt++;
        exp_fb[r][c] = px;
      end
    for (int k = 0; k < 3; k++) seed_model[k] = sum[k] / cnt;
  endtask

  task automatic send_frame();
    cam_send(8'h41); cam_send(8'h43); cam_send(8'h4B); cam_send(8'h0D);
    cam_send(8'd1);
    for (int c = 0; c < COLS; c++) begin
      cam_send(8'd2);
      for (int r = 0; r < CAM_ROWS; r++)
        for (int k = 0; k < 3; k++) cam_send(cam[c][r][k]);
    end
    cam_send(8'd3);
    cam_send(8'h3A);  // prompt
  endtask

  // compare one whole VGA frame with the expected edge image
  task automatic check_vga(input int f);
    int bad = 0;
    @(posedge clk); #1;
    while (!dut.u_vga.frame_start) begin @(posedge clk); #1; end
    for (int y = 0; y < 525; y++)
      for (int x = 0; x < 800; x++) begin
        int ix = x / 8, iy = y / 4;
        logic [11:0] e = 0;
        if (x < 640 && y < 480 && ix > 0 && ix < COLS - 1 && iy > 0 && iy < ROWS - 1) e = exp_fb[iy][ix];
        if ({vga_r, vga_g, vga_b} != e || vga_hs != !(x >= 656 && x < 752) || vga_vs != !(y >= 490 && y < 492)) begin
          bad++;
          if (bad < 5) $display("FAIL frame %0d VGA (%0d,%0d) %h expected %h", f, x, y, {vga_r, vga_g, vga_b}, e);
        end
        @(posedge clk); @(posedge clk); #1;
      end
    check(bad == 0, $sformatf("frame %0d: %0d wrong VGA pixels", f, bad));
  endtask

  task automatic knob_step();
    rot_a = 1; repeat (DEB + 8) @(posedge clk);
    rot_b = 1; repeat (DEB + 8) @(posedge clk);
    rot_a = 0; repeat (DEB + 8) @(posedge clk);
    rot_b = 0; repeat (DEB + 8) @(posedge clk);
    factor_model++;
  endtask

  initial begin
    int tok0, dat0;
    cam_rx = 1; rot_a = 0; rot_b = 0; rot_press = 0; rst = 1;
    repeat (10) @(posedge clk);
    rst = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      int t0;
      if (f == NFRAMES - 1) begin
        for (int i = 0; i < NDETENT; i++) knob_step();
        check(int'(led) == factor_model, $sformatf("factor %0d expected %0d", led, factor_model));
      end
      make_frame(f);
      model_frame();
      // the camera answers only to a command
      t0 = 0;
      while (n_cmd < f + 1 && t0 < 40 * CPB * 10) begin @(posedge clk); t0++; end
      check(n_cmd == f + 1, $sformatf("command before frame %0d", f));
      tok0 = n_pix_tok; dat0 = n_data_bytes;
      send_frame();
      repeat (200) @(posedge clk);
      check(n_pix_tok - tok0 == COLS * ROWS, $sformatf("frame %0d: %0d pixels kept", f, n_pix_tok - tok0));
      n_trimmed += (n_data_bytes - dat0) / 3 - (n_pix_tok - tok0);
      check(thr_r == 15'((seed_model[0] * factor_model) >> 4) &&
            thr_g == 15'((seed_model[1] * factor_model) >> 4) &&
            thr_b == 15'((seed_model[2] * factor_model) >> 4),
            $sformatf("frame %0d thresholds %0d %0d %0d expected seeds %0d %0d %0d", f, thr_r, thr_g, thr_b,
                      seed_model[0], seed_model[1], seed_model[2]));
      check(!dut.overrun, "no token overrun");
      check_vga(f);
    end
    // let the LCD finish a refresh that shows the final factor
    begin
      automatic int n2 = n_lcd_line2;
      wait (n_lcd_line2 >= n2 + 2);
    end
    $display("mechanisms: commands=%0d ignored_bytes=%0d trimmed_pixels=%0d threshold_updates=%0d edge_px=%0d flat_px=%0d factor_changes=%0d lcd_refreshes=%0d",
             n_cmd, n_ignored, n_trimmed, n_thr_update, n_edge, n_flat, n_factor, n_lcd_line2);
    check(lcd_text[0] == "TURN KNOB: LEVEL", {"LCD line 1 '", lcd_text[0], "'"});
    check(lcd_last2 == {"PUSH=RESET F=", hex_up(led), " "}, {"LCD line 2 '", lcd_last2, "'"});
    check(n_cmd > 0, "DF command sent");
    check(n_ignored > 0, "bytes outside a frame ignored");
    check(n_trimmed == NFRAMES * COLS * (CAM_ROWS - ROWS), "rows trimmed");
    check(n_thr_update == NFRAMES, "threshold recomputed per frame");
    check(n_edge > 0, "edge pixels written");
    check(n_flat > 0, "non-edge pixels written");
    check(n_factor == NDETENT, "factor changed by the knob");
    check(n_lcd_line2 > 2, "LCD refreshed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
