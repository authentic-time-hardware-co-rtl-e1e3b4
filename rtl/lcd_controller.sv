// lcd_controller: user-instruction text on a 2 x 16 character LCD.
//
// Drives an HD44780-compatible character module through its 4-bit bus
// (lcd_d, lcd_rs, lcd_e; lcd_rw is held low, the module is only written).
// After power-on it waits POWERON_CLKS, sends the three 0x3 wake-up nibbles
// and the 0x2 nibble that selects 4-bit mode, each followed by INIT_CLKS,
// then the bytes 0x28 (two lines, 5x8 font), 0x06 (cursor moves right),
// 0x0C (display on, no cursor) and 0x01 (clear, followed by CLEAR_CLKS).
// From then on it rewrites both lines for ever:
//     line 1  "TURN KNOB: LEVEL"
//     line 2  "PUSH=RESET F=hh "   hh = current user factor in hex
// so a knob change appears within one refresh (about 1.4 ms at 50 MHz).
// The factor is sampled once at the start of each refresh.
//
// A byte goes out as two nibbles, high first.  For each nibble rs and d are
// set, held SETUP_CLKS clocks, then e is high for E_CLKS clocks; between the
// two nibbles of a byte the bus rests GAP_CLKS clocks, after a byte
// CMD_CLKS (CLEAR_CLKS after the clear command).  The defaults are the
// module's published minimum times at 50 MHz with margin: 15 ms, 4.1 ms,
// 40 us, 1.64 ms, 40 ns, 240 ns, 1 us.
//
// The described board has this display for user instructions; the text,
// the factor readout, the 4-bit bus timing and the refresh loop are this
// design's choices.
module lcd_controller #(
  parameter int POWERON_CLKS = 750_000,
  parameter int INIT_CLKS    = 205_000,
  parameter int CMD_CLKS     = 2_000,
  parameter int CLEAR_CLKS   = 82_000,
  parameter int SETUP_CLKS   = 2,
  parameter int E_CLKS       = 12,
  parameter int GAP_CLKS     = 50
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] factor,
  output logic       lcd_e,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic [3:0] lcd_d
);
  // item list: 0..3 init nibbles, 4..7 set-up bytes, 8 line-1 address,
  // 9..24 line-1 text, 25 line-2 address, 26..41 line-2 text
  localparam int N_NIB      = 4;
  localparam int LOOP_FIRST = 8;
  localparam int LAST       = 41;
  localparam int MAXW = (POWERON_CLKS > INIT_CLKS) ?
                        ((POWERON_CLKS > CLEAR_CLKS) ? POWERON_CLKS : CLEAR_CLKS) :
                        ((INIT_CLKS > CLEAR_CLKS) ? INIT_CLKS : CLEAR_CLKS);
  localparam int CW = $clog2(MAXW + 1);

  typedef enum logic [1:0] {S_WAIT, S_SETUP, S_EHI} state_e;

  state_e      state;
  logic [5:0]  idx;
  logic        low_half;
  logic [CW-1:0] cnt;
  logic [7:0]  fac_q;

  // current item
  logic        it_nib, it_rs;
  logic [7:0]  it_byte;
  logic [CW-1:0] it_wait;

  function automatic logic [7:0] hex_char(input logic [3:0] v);
    return (v < 4'd10) ? 8'(8'h30 + v) : 8'(8'h37 + v);
  endfunction

  // the fixed text, first character in the most significant byte
  localparam logic [16*8-1:0] LINE1 = "TURN KNOB: LEVEL";
  localparam logic [16*8-1:0] LINE2 = "PUSH=RESET F=   ";

  function automatic logic [7:0] text1(input logic [3:0] p);
    return LINE1[8*(15 - int'(p)) +: 8];
  endfunction

  function automatic logic [7:0] text2(input logic [3:0] p, input logic [7:0] f);
    if (p == 4'd13) return hex_char(f[7:4]);
    if (p == 4'd14) return hex_char(f[3:0]);
    return LINE2[8*(15 - int'(p)) +: 8];
  endfunction

  always_comb begin
    it_nib  = (idx < 6'(N_NIB));
    it_rs   = 1'b0;
    it_wait = CW'(CMD_CLKS - 1);
    unique case (idx)
      6'd0, 6'd1, 6'd2: it_byte = 8'h30;
      6'd3:             it_byte = 8'h20;
      6'd4:             it_byte = 8'h28;
      6'd5:             it_byte = 8'h06;
      6'd6:             it_byte = 8'h0C;
      6'd7:             it_byte = 8'h01;
      6'd8:             it_byte = 8'h80;
      6'd25:            it_byte = 8'hC0;
      default: begin
        it_rs   = 1'b1;
        it_byte = (idx < 6'd25) ? text1(4'(idx - 6'd9)) : text2(4'(idx - 6'd26), fac_q);
      end
    endcase
    if (it_nib)           it_wait = CW'(INIT_CLKS - 1);
    else if (idx == 6'd7) it_wait = CW'(CLEAR_CLKS - 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_WAIT;
      idx      <= '0;
      low_half <= 1'b0;
      cnt      <= CW'(POWERON_CLKS - 1);
      fac_q    <= factor;
      lcd_e    <= 1'b0;
      lcd_rs   <= 1'b0;
      lcd_d    <= '0;
    end else begin
      unique case (state)
        S_WAIT:
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            if (idx == 6'(LOOP_FIRST) && !low_half) fac_q <= factor;
            lcd_rs <= it_rs;
            lcd_d  <= low_half ? it_byte[3:0] : it_byte[7:4];
            cnt    <= CW'(SETUP_CLKS - 1);
            state  <= S_SETUP;
          end
        S_SETUP:
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            lcd_e <= 1'b1;
            cnt   <= CW'(E_CLKS - 1);
            state <= S_EHI;
          end
        S_EHI:
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            lcd_e <= 1'b0;
            state <= S_WAIT;
            if (!it_nib && !low_half) begin
              low_half <= 1'b1;
              cnt      <= CW'(GAP_CLKS - 1);
            end else begin
              low_half <= 1'b0;
              cnt      <= it_wait;
              idx      <= (idx == 6'(LAST)) ? 6'(LOOP_FIRST) : idx + 1'b1;
            end
          end
        default: state <= S_WAIT;
      endcase
    end
  end

  assign lcd_rw = 1'b0;
endmodule
