// tb_ppg: self-checking test of the programmable period generator.
//
// Sc ticks arrive on random clocks. P1 is wired to the generator's own end
// of period, as in the loop, and a new random period word (including words
// below N_MIN) is offered every clock. The test counts Sc ticks between ends
// of period and expects the first period to be INIT_PERIOD ticks and every
// later one to be the word offered at the previous end, raised to N_MIN.
module tb_ppg;
  localparam int unsigned W    = 8;
  localparam int unsigned INIT = 20;
  localparam int unsigned NMIN = 3;

  logic         clk = 1'b0, rst_n, tick, borrow;
  logic [W-1:0] nb, period;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  ppg #(.WIDTH(W), .INIT_PERIOD(INIT), .N_MIN(NMIN)) dut (
    .clk, .rst_n, .tick_c_i(tick), .p1_i(borrow), .nb_i(nb), .borrow_o(borrow), .period_o(period));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int ticks, expected, n_periods, n_clamped;
    tick = 0; nb = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    ticks = 0; expected = INIT; n_periods = 0; n_clamped = 0;
    check(period == W'(INIT), "period_o after reset");
    while (n_periods < 1500) begin
      tick = ($urandom_range(9) < 7);
      nb   = ($urandom_range(9) == 0) ? W'($urandom_range(NMIN - 1)) : W'(NMIN + $urandom_range(60));
      #1;
      if (tick) ticks++;
      if (borrow) begin
        check(tick, "end of period without an Sc tick");
        check(ticks == expected, $sformatf("period %0d: %0d ticks, expected %0d", n_periods, ticks, expected));
        expected = (int'(nb) < NMIN) ? NMIN : int'(nb);
        if (int'(nb) < NMIN) n_clamped++;
        ticks = 0;
        n_periods++;
      end
      @(posedge clk);
      #1;
      if (n_periods > 0) check(period == W'(expected), "period_o");
    end
    check(n_clamped > 10, "words below N_MIN exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
