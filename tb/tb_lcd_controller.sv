// tb_lcd_controller: checks the character-LCD writer.
//
// Short timing parameters keep the run small.  A monitor records every
// falling edge of lcd_e with rs and the data nibble, and the clock counts
// around it.  The test checks:
//   - the nibble/byte stream: four init nibbles 3,3,3,2, the set-up bytes
//     28 06 0C 01, then per refresh 80, the 16 line-1 characters, C0 and
//     the 16 line-2 characters with the factor in hex, against text built
//     here from plain strings;
//   - the factor shown follows changes made between refreshes;
//   - timing: power-on wait before the first strobe, e high for E_CLKS,
//     data stable SETUP_CLKS before e rises and while it is high, and the
//     minimum rest after each nibble, byte and the clear command;
//   - lcd_rw stays low.
module tb_lcd_controller;
  localparam int PON = 300, INIT = 100, CMD = 40, CLR = 150, SU = 2, EW = 5, GAP = 10;
  localparam int NREFRESH = 3;

  logic clk = 0, rst = 1;
  logic [7:0] factor = 8'h10;
  logic lcd_e, lcd_rs, lcd_rw;
  logic [3:0] lcd_d;
  int checks = 0, failures = 0, nerr = 0;

  lcd_controller #(
    .POWERON_CLKS(PON), .INIT_CLKS(INIT), .CMD_CLKS(CMD), .CLEAR_CLKS(CLR),
    .SETUP_CLKS(SU), .E_CLKS(EW), .GAP_CLKS(GAP)
  ) dut (.*);

  always #10 clk = !clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (nerr++ < 20) $display("FAIL %s", what);
    end
  endtask

  // ---- bus monitor ----
  typedef struct { bit rs; logic [3:0] d; int t_fall; int t_rise; } strobe_t;
  strobe_t strobes [$];
  int cyc = 0, t_rel = -1, t_bus = 0, t_rise = 0;
  logic e_q = 0, rs_q = 0;
  logic [3:0] d_q = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (t_rel < 0) t_rel = cyc;
      check(!lcd_rw, "rw low");
      if (lcd_rs != rs_q || lcd_d != d_q) begin
        t_bus = cyc;
        if (e_q) check(0, $sformatf("bus changed while e high at %0d", cyc));
      end
      if (lcd_e && !e_q) begin
        t_rise = cyc;
        check(cyc - t_bus >= SU, $sformatf("setup %0d clocks at %0d", cyc - t_bus, cyc));
      end
      if (!lcd_e && e_q) begin
        check(cyc - t_rise == EW, $sformatf("e width %0d", cyc - t_rise));
        strobes.push_back('{lcd_rs, lcd_d, cyc, t_rise});
      end
    end
    e_q <= lcd_e;
    rs_q <= lcd_rs;
    d_q <= lcd_d;
  end

  // ---- expected stream ----
  typedef struct { bit nib; bit rs; logic [7:0] b; int rest; } item_t;
  item_t exp_items [$];

  function automatic string hex2(input logic [7:0] v);
    string digits = "0123456789ABCDEF";
    string r = "  ";
    r[0] = digits[v[7:4]];
    r[1] = digits[v[3:0]];
    return r;
  endfunction

  task automatic add(input bit nib, input bit rs, input logic [7:0] b, input int rest);
    exp_items.push_back('{nib, rs, b, rest});
  endtask

  task automatic add_refresh(input logic [7:0] f);
    string l1 = "TURN KNOB: LEVEL";
    string l2 = {"PUSH=RESET F=", hex2(f), " "};
    add(0, 0, 8'h80, CMD);
    for (int i = 0; i < 16; i++) add(0, 1, l1[i], CMD);
    add(0, 0, 8'hC0, CMD);
    for (int i = 0; i < 16; i++) add(0, 1, l2[i], CMD);
  endtask

  logic [7:0] fac_seq [NREFRESH] = '{8'h10, 8'hA7, 8'h05};

  initial begin
    automatic int k = 0;
    automatic int prev_fall = 0;
    automatic int prev_rest = PON;
    add(1, 0, 8'h30, INIT);
    add(1, 0, 8'h30, INIT);
    add(1, 0, 8'h30, INIT);
    add(1, 0, 8'h20, INIT);
    add(0, 0, 8'h28, CMD);
    add(0, 0, 8'h06, CMD);
    add(0, 0, 8'h0C, CMD);
    add(0, 0, 8'h01, CLR);
    for (int r = 0; r < NREFRESH; r++) add_refresh(fac_seq[r]);

    repeat (3) @(posedge clk);
    rst <= 0;
    foreach (exp_items[i]) begin
      automatic item_t it = exp_items[i];
      automatic int nn = it.nib ? 1 : 2;
      for (int h = 0; h < nn; h++) begin
        automatic strobe_t s;
        automatic logic [3:0] want = (h == 0) ? it.b[7:4] : it.b[3:0];
        wait (strobes.size() > 0);
        s = strobes.pop_front();
        check(s.rs == it.rs && s.d == want,
              $sformatf("item %0d half %0d: rs=%0d d=%h expected rs=%0d d=%h",
                        i, h, s.rs, s.d, it.rs, want));
        // rest before this strobe: from the previous fall to this rise,
        // minus the setup time that is part of every strobe
        if (k == 0)
          check(s.t_rise - t_rel >= PON, $sformatf("power-on wait %0d", s.t_rise - t_rel));
        else
          check(s.t_rise - prev_fall >= prev_rest + SU,
                $sformatf("item %0d: rest %0d < %0d", i, s.t_rise - prev_fall, prev_rest + SU));
        prev_fall = s.t_fall;
        prev_rest = (h == 0 && !it.nib) ? GAP : it.rest;
        k++;
      end
      // change the factor right after the last character of a refresh
      if (i >= 8 && (i - 8) % 34 == 33 && (i - 8) / 34 + 1 < NREFRESH)
        factor = fac_seq[(i - 8) / 34 + 1];
    end
    check(k == 8 * 2 - 4 + NREFRESH * 34 * 2, "strobe count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
