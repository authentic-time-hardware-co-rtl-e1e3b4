// rotary_encoder: user threshold factor from the board's rotary knob.
//
// The quadrature outputs A and B and the shaft push-button are synchronised
// by two flops and debounced: a level is accepted once it has been stable
// for DEBOUNCE clocks (50,000 = 1 ms at 50 MHz).  On each accepted rising
// edge of A the factor steps by one: up when B is low, down when B is high.
// It saturates at 1 and at 255.  Pressing the shaft sets it back to
// FACTOR_INIT (16, which is 1.0 with the factor's 4 fraction bits).  That the
// knob scales the threshold follows the described system; the decoding,
// the step size, the limits and the press action are this design's choices.
module rotary_encoder
  import edge_pkg::*;
#(
  parameter int DEBOUNCE    = 50000,
  parameter int FACTOR_INIT = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             rot_a,
  input  logic             rot_b,
  input  logic             press,
  output logic [FAC_W-1:0] factor
);
  localparam int DW = $clog2(DEBOUNCE + 1);

  logic [2:0] s1, s2;       // synchroniser stages for {press, b, a}
  logic [2:0] stable;       // debounced levels
  logic [2:0] prev;         // debounced levels one clock ago
  logic [DW-1:0] dcnt [3];

  always_ff @(posedge clk) begin
    if (rst) begin
      s1     <= '0;
      s2     <= '0;
      stable <= '0;
      prev   <= '0;
      for (int i = 0; i < 3; i++) dcnt[i] <= '0;
      factor <= FAC_W'(FACTOR_INIT);
    end else begin
      s1   <= {press, rot_b, rot_a};
      s2   <= s1;
      prev <= stable;
      for (int i = 0; i < 3; i++) begin
        if (s2[i] == stable[i]) dcnt[i] <= '0;
        else if (dcnt[i] == DW'(DEBOUNCE - 1)) begin
          stable[i] <= s2[i];
          dcnt[i]   <= '0;
        end else dcnt[i] <= dcnt[i] + 1'b1;
      end
      if (stable[2] && !prev[2]) factor <= FAC_W'(FACTOR_INIT);
      else if (stable[0] && !prev[0]) begin
        if (!stable[1]) begin
          if (factor != '1) factor <= factor + 1'b1;
        end else begin
          if (factor > FAC_W'(1)) factor <= factor - 1'b1;
        end
      end
    end
  end
endmodule
