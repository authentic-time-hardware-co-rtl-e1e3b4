// tb_rotary_encoder: checks knob decoding, debouncing, limits and reset.
//
// With DEBOUNCE = 8 it turns the knob through full quadrature cycles in both
// directions (with contact bounce shorter than the debounce time on every
// transition), checks the factor after each detent against a counting
// model, drives it into both limits, and checks that a press restores 16.
module tb_rotary_encoder;
  import edge_pkg::*;
  localparam int DEB = 8;
  logic clk = 0, rst = 1, rot_a = 0, rot_b = 0, press = 0;
  logic [FAC_W-1:0] factor;
  int checks = 0, failures = 0;
  int model = 16;

  rotary_encoder #(.DEBOUNCE(DEB)) dut (.clk, .rst, .rot_a, .rot_b, .press, .factor);

  always #5 clk = !clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // set a line with bounce, then hold it long enough to be accepted
  task automatic set_line(ref logic line, input logic v);
    for (int i = 0; i < 3; i++) begin
      line = v; repeat ($urandom_range(1, DEB / 2 - 1)) @(posedge clk);
      line = !v; repeat ($urandom_range(1, DEB / 2 - 1)) @(posedge clk);
    end
    line = v; repeat (DEB + 6) @(posedge clk);
  endtask

  // one detent: clockwise A leads B
  task automatic step(input bit up);
    if (up) begin
      set_line(rot_a, 1); set_line(rot_b, 1); set_line(rot_a, 0); set_line(rot_b, 0);
      if (model < 255) model++;
    end else begin
      set_line(rot_b, 1); set_line(rot_a, 1); set_line(rot_b, 0); set_line(rot_a, 0);
      if (model > 1) model--;
    end
    check(int'(factor) == model, $sformatf("factor %0d expected %0d", factor, model));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (20) @(posedge clk);
    check(factor == 16, "factor 1.0 after reset");
    for (int i = 0; i < 10; i++) step(1);
    for (int i = 0; i < 40; i++) step(0);       // into the lower limit
    check(factor == 1, "lower limit");
    for (int i = 0; i < 60; i++) step($urandom_range(0, 1));
    set_line(press, 1); set_line(press, 0);
    model = 16;
    check(factor == 16, "press restores 1.0");
    for (int i = 0; i < 250; i++) step(1);      // into the upper limit
    check(factor == 255, "upper limit");
    // a glitch on A shorter than the debounce time changes nothing
    rot_a = 1; repeat (DEB / 2) @(posedge clk); rot_a = 0; repeat (3 * DEB) @(posedge clk);
    check(factor == 255, "glitch ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
