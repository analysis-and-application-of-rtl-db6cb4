// tb_fll_top: end-to-end test of the frequency locked loop at its default
// parameters (8-bit counters, Sc on every clock).
//
// A pulse train with a programmable period drives Sin; fll_monitor checks
// the loop equation and the output period at every end of period. The test
// runs four phases without reset in between:
//   A  f1 = f2 = fc/2, input period 100 clocks, start period 128: the output
//      must lock to 100 and d must settle where the first-order model puts it,
//      d_inf = (TO(k) - TI) / (f1/fc) + d(k), with TO(k) the period that
//      starts where d(k) ends, taken from an early step k;
//   B  switch to f1/fc = 230/256 and step the input to 110 clocks: the
//      output must relock to 110 and d settle where the model puts it;
//   C  switch to a slow loop, f1/fc = 26/256, and step the input to 200
//      clocks: the output runs ahead, two Sop pulses fall into one Sin period
//      and the sign generator goes to 1;
//   D  step the input to 60 clocks: two Sin pulses fall into one Sop period
//      and the sign generator goes back to 0.
// Every mechanism is counted and a failure is counted for one that never
// happened: end-of-period control sequence, lock, ratio switch, both sign
// states. (Phases C and D leave the range where d stays between 0 and the
// input period; the loop is not required to lock there.)
module tb_fll_top;
  logic       clk = 1'b0, rst_n, sin;
  logic [7:0] ratio;
  logic       sop, sign, ovf, tc, t1, t2;
  logic [7:0] nb;
  int         checks = 0, failures = 0;
  int         sin_period = 100;

  always #5 clk = ~clk;

  fll_top dut (
    .clk, .rst_n, .sin_i(sin), .f1_ratio_i(ratio), .sop_o(sop), .nb_o(nb), .sign_o(sign),
    .ovf_o(ovf), .tick_c_o(tc), .tick_1_o(t1), .tick_2_o(t2));

  fll_monitor #(.W(8), .NMIN(3), .INIT(128), .SYNC(2)) mon (
    .clk, .rst_n, .sin_i(sin), .sop_o(sop), .nb_o(nb), .tick_c(tc), .tick_1(t1), .tick_2(t2));

  // Sin: two clocks high per period, changing just after the rising edge
  bit sin_run = 0;
  int sin_cnt = 0;
  always @(posedge clk) begin
    #1;
    if (!sin_run) begin
      sin = 1'b0;
      sin_cnt = 0;
    end else begin
      sin = (sin_cnt < 2);
      sin_cnt = (sin_cnt + 1 >= sin_period) ? 0 : sin_cnt + 1;
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + mon.failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // wait for n more ends of period
  task automatic periods(input int n);
    int target;
    target = mon.n_periods + n;
    while (mon.n_periods < target) @(negedge clk);
  endtask

  // output locked: the last four periods within 2 clocks of the input
  function automatic bit locked(input int ti);
    int n;
    n = mon.hist_to.size();
    if (n < 4) return 0;
    for (int i = n - 4; i < n; i++)
      if (mon.hist_to[i] > ti + 2 || mon.hist_to[i] < ti - 2) return 0;
    return 1;
  endfunction

  int n_lock = 0, n_switch = 0, n_sign1 = 0, n_sign0 = 0;
  bit last_sign = 0;
  always @(negedge clk) if (rst_n) begin
    if (sign && !last_sign) n_sign1++;
    if (!sign && last_sign) n_sign0++;
    last_sign = sign;
  end

  // d_inf of the first-order model from step k: (TO(k+1) - TI) / (f1/fc) + d(k),
  // where TO(k+1) is the word loaded at the end of step k
  task automatic model_point(input real a1, input int ti, output int d_pred);
    real delta;
    delta  = real'(int'(nb) - ti) / a1;
    d_pred = $rtoi(delta) + mon.last_d;
  endtask

  initial begin
    int d_pred, d_fin;
    ratio = 8'd128;
    sin = 1'b0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    // first Sin edge inside the first output period, so that every output
    // period holds one Sin edge and the first-order model applies
    repeat (58) @(posedge clk);
    sin_run = 1;

    // ---- A: f1 = f2 = fc/2, input period 100
    periods(2);
    model_point(0.5, 100, d_pred);
    periods(30);
    check(locked(100), $sformatf("A: no lock to 100 (last TO %0d)", mon.last_to));
    if (locked(100)) n_lock++;
    d_fin = mon.last_d;
    check(d_fin >= d_pred - 4 && d_fin <= d_pred + 4,
          $sformatf("A: d settled at %0d, model gives %0d", d_fin, d_pred));
    $display("A: d_inf model %0d, seen %0d", d_pred, d_fin);

    // ---- B: ratio switch to f1/fc = 230/256 right after an end of period,
    // input step to 110 (the running input period is stretched to 110)
    periods(1);
    ratio = 8'd230;
    n_switch++;
    sin_period = 110;
    // the d that ended at the switch was counted with the old f1: start the
    // model one step later
    periods(1);
    model_point(230.0 / 256.0, 110, d_pred);
    periods(20);
    check(locked(110), $sformatf("B: no relock to 110 (last TO %0d)", mon.last_to));
    if (locked(110)) n_lock++;
    d_fin = mon.last_d;
    check(d_fin >= d_pred - 4 && d_fin <= d_pred + 4,
          $sformatf("B: d settled at %0d, model gives %0d", d_fin, d_pred));
    $display("B: d_inf model %0d, seen %0d", d_pred, d_fin);

    // ---- C: slow loop (f1/fc = 26/256), input period 200: the output runs
    // ahead, two Sop pulses fall into one Sin period
    ratio = 8'd26;
    n_switch++;
    sin_period = 200;
    periods(20);

    // ---- D: input period 60: two Sin pulses fall into one Sop period
    sin_period = 60;
    periods(40);

    check(mon.n_periods > 100, "control sequence P1/P2/R exercised");
    check(n_lock == 2, "lock");
    check(n_switch == 2, "ratio switch");
    check(n_sign1 > 0, "sign state 1 (two Sop in one Sin period) never reached");
    check(n_sign0 > 0, "sign state 0 (two Sin in one Sop period) never reached after state 1");
    $display("mechanisms: periods(P1/P2/R)=%0d locks=%0d ratio_switch=%0d sign->1=%0d sign->0=%0d",
             mon.n_periods, n_lock, n_switch, n_sign1, n_sign0);
    $display("TB_RESULT checks=%0d failures=%0d", checks + mon.checks, failures + mon.failures);
    $finish;
  end
endmodule
