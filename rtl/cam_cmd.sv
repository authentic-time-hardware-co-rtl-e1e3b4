// cam_cmd: issues the camera's dump-frame command.
//
// After reset, and again each time the stream parser reports a frame end,
// this process sends the three characters 'D', 'F' and carriage return to
// the camera through uart_tx, which makes the camera dump one more frame and
// so keeps video flowing.  Each byte is offered with request/grant: `tx_req`
// and `tx_data` are held until `tx_gnt`.  A frame end that arrives while a
// command is still being sent is remembered and served afterwards.  The DF
// command follows the described system; re-issuing it per frame and sending
// no register set-up commands are this design's choices.
module cam_cmd (
  input  logic       clk,
  input  logic       rst,
  input  logic       frame_done,
  output logic       tx_req,
  output logic [7:0] tx_data,
  input  logic       tx_gnt
);
  logic [1:0] idx;      // next character, 0..2
  logic       pending;  // a command is still to be (re)sent

  always_comb begin
    case (idx)
      2'd0:    tx_data = 8'h44;  // 'D'
      2'd1:    tx_data = 8'h46;  // 'F'
      default: tx_data = 8'h0D;  // carriage return
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx     <= '0;
      pending <= 1'b1;   // ask for the first frame right after reset
      tx_req  <= 1'b0;
    end else begin
      if (!tx_req && pending) begin
        tx_req  <= 1'b1;
        pending <= 1'b0;
        idx     <= '0;
      end else if (tx_req && tx_gnt) begin
        if (idx == 2'd2) tx_req <= 1'b0;
        else             idx    <= idx + 1'b1;
      end
      if (frame_done) pending <= 1'b1;
    end
  end

  // A byte on offer stays on offer until granted.
  a_hold: assert property (@(posedge clk) disable iff (rst)
                           tx_req && !tx_gnt |=> tx_req && $stable(tx_data));
endmodule
