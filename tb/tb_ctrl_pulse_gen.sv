// tb_ctrl_pulse_gen: self-checking test of the control pulse sequence.
//
// End-of-period pulses arrive at random spacings of at least three clocks.
// For each the test expects P1 in the same clock, P2 one clock later and R
// two clocks later, and nothing else.
module tb_ctrl_pulse_gen;
  import fll_pkg::*;

  logic  clk = 1'b0, rst_n, ev;
  ctrl_t ctrl;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  ctrl_pulse_gen dut (.clk, .rst_n, .sop_fall_i(ev), .ctrl_o(ctrl));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit h1, h2;  // event one and two clocks ago
    int gap, n_ev;
    ev = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    h1 = 0; h2 = 0; gap = 5; n_ev = 0;
    for (int i = 0; i < 20000; i++) begin
      ev = (gap >= 3) && ($urandom_range(3) == 0);
      if (ev) begin
        gap = 0;
        n_ev++;
      end else gap++;
      #1;
      checks++;
      if (ctrl.p1 != ev || ctrl.p2 != h1 || ctrl.r != h2) begin
        failures++;
        $display("FAIL: cycle %0d: P1 P2 R = %0b %0b %0b, expected %0b %0b %0b",
                 i, ctrl.p1, ctrl.p2, ctrl.r, ev, h1, h2);
      end
      h2 = h1;
      h1 = ev;
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_ev < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
