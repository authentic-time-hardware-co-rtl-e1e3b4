// adaptive_threshold: per-colour-plane edge threshold from a moving average.
//
// During a frame it adds up every gradient magnitude it is given and counts
// them.  On `frame_end` it divides the sum by the count with a restoring
// divider (one quotient bit per clock, SUM_W clocks, `busy` high meanwhile)
// and the quotient - the mean |G| of the frame just finished - becomes the
// threshold seed used for the next frame.  The threshold is the seed times
// the user factor, which has FAC_FRAC = 4 fraction bits (16 means 1.0):
//   thr = (seed * factor) >> 4.
// Images with much detail thus get a higher threshold, plain ones a lower
// one.  The seed is 0 after reset; a frame with no gradients keeps the old
// seed.  Seed-by-averaging and user scaling follow the described design;
// exact integer division, the factor format and the reset value are this
// design's choices.
module adaptive_threshold
  import edge_pkg::*;
#(
  parameter int SUM_W = 25,
  parameter int CNT_W = 14
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              grad_valid,
  input  logic [GRAD_W-1:0] grad,
  input  logic              frame_end,
  input  logic [FAC_W-1:0]  factor,
  output logic              busy,
  output logic [GRAD_W-1:0] seed,
  output logic [THR_W-1:0]  thr
);
  localparam int BW = $clog2(SUM_W + 1);

  logic [SUM_W-1:0] sum;
  logic [CNT_W-1:0] cnt;
  logic [SUM_W-1:0] quo;     // dividend shifting out, quotient shifting in
  logic [CNT_W:0]   rem;
  logic [CNT_W-1:0] div;
  logic [BW-1:0]    steps;
  logic [CNT_W:0]   trial;
  logic             run;

  assign trial = {rem[CNT_W-1:0], quo[SUM_W-1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      sum   <= '0;
      cnt   <= '0;
      quo   <= '0;
      rem   <= '0;
      div   <= '0;
      steps <= '0;
      run   <= 1'b0;
    end else begin
      if (frame_end) begin
        sum <= '0;
        cnt <= '0;
        if (cnt != 0) begin
          run   <= 1'b1;
          quo   <= sum;
          rem   <= '0;
          div   <= cnt;
          steps <= BW'(SUM_W);
        end
      end else if (grad_valid) begin
        sum <= sum + SUM_W'(grad);
        cnt <= cnt + 1'b1;
      end
      if (run) begin
        if (trial >= {1'b0, div}) begin
          rem <= trial - {1'b0, div};
          quo <= {quo[SUM_W-2:0], 1'b1};
        end else begin
          rem <= trial;
          quo <= {quo[SUM_W-2:0], 1'b0};
        end
        steps <= steps - 1'b1;
        if (steps == BW'(1)) run <= 1'b0;
      end
    end
  end

  // The mean of values below 2^GRAD_W is below 2^GRAD_W.
  logic done_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      done_q <= 1'b0;
      seed   <= '0;
    end else begin
      done_q <= run && steps == BW'(1);
      if (done_q) seed <= GRAD_W'(quo);
    end
  end

  assign busy = run || done_q;

  assign thr = THR_W'(({{FAC_W{1'b0}}, seed} * {{GRAD_W{1'b0}}, factor}) >> FAC_FRAC);

  a_no_grad_while_busy: assert property (@(posedge clk) disable iff (rst) run |-> !grad_valid);
endmodule
