// uart_rx: RS-232 receiver for the camera stream.
//
// Receives 8N1 frames (start bit, 8 data bits LSB first, stop bit) at
// CLKS_PER_BIT clocks per bit; the default 434 gives 115,200 baud from the
// 50 MHz board clock, the camera link speed of the described system.  The
// line is synchronised by two flops; a falling edge starts a frame, the start
// bit is re-checked half a bit later and every following bit is sampled in
// its middle.  `valid` pulses for one clock with `data` after the stop bit
// has been sampled; `frame_err` pulses with it when the stop bit was low
// (the byte is then still delivered).  Frame format and sampling scheme are
// this design's choice.
module uart_rx #(
  parameter int CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  state_e        state;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    shreg;
  logic [1:0]    sync;

  always_ff @(posedge clk) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rx};
  end

  wire rxs = sync[1];

  always_ff @(posedge clk) begin
    valid     <= 1'b0;
    frame_err <= 1'b0;
    if (rst) begin
      state <= IDLE;
      cnt   <= '0;
      bitn  <= '0;
      shreg <= '0;
      data  <= '0;
    end else begin
      case (state)
        IDLE: if (!rxs) begin
          state <= START;
          cnt   <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        START: if (cnt == 0) begin
          if (!rxs) begin
            state <= DATA;
            cnt   <= CW'(CLKS_PER_BIT - 1);
            bitn  <= '0;
          end else begin
            state <= IDLE;       // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        DATA: if (cnt == 0) begin
          shreg <= {rxs, shreg[7:1]};
          cnt   <= CW'(CLKS_PER_BIT - 1);
          if (bitn == 3'd7) state <= STOP;
          bitn  <= bitn + 1'b1;
        end else cnt <= cnt - 1'b1;
        STOP: if (cnt == 0) begin
          data      <= shreg;
          valid     <= 1'b1;
          frame_err <= !rxs;
          state     <= IDLE;
        end else cnt <= cnt - 1'b1;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
