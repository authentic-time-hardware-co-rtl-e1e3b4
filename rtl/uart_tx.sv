// uart_tx: RS-232 transmitter for the camera commands.
//
// Sends one 8N1 frame (start bit, 8 data bits LSB first, stop bit) per
// accepted byte at CLKS_PER_BIT clocks per bit (434 = 115,200 baud at 50 MHz).
// A byte is offered with the request/grant handshake used between the
// processes of the design: the sender holds `req` and `data` until `gnt`
// pulses for one clock, which happens when the transmitter is idle.  `tx`
// idles high.  The frame format is this design's choice.
module uart_tx #(
  parameter int CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       req,
  input  logic [7:0] data,
  output logic       gnt,
  output logic       busy,
  output logic       tx
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    bitn;   // bits left to send, including start and stop
  logic [9:0]    shreg;  // {stop, data, start}, sent LSB first

  assign gnt = req && !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      tx    <= 1'b1;
      cnt   <= '0;
      bitn  <= '0;
      shreg <= '1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (req) begin
        busy  <= 1'b1;
        shreg <= {1'b1, data, 1'b0};
        bitn  <= 4'd10;
        cnt   <= '0;
      end
    end else if (cnt == 0) begin
      if (bitn == 0) begin
        busy <= 1'b0;
        tx   <= 1'b1;
      end else begin
        tx    <= shreg[0];
        shreg <= {1'b1, shreg[9:1]};
        bitn  <= bitn - 1'b1;
        cnt   <= CW'(CLKS_PER_BIT - 1);
      end
    end else begin
      cnt <= cnt - 1'b1;
    end
  end
endmodule
