// tb_fll_workloads: the loop on the input signals of the locking, noise and
// tracking studies, with one time unit = 10 clocks = 10 periods of Sc.
//
// Each case runs its own loop (fll_bench) from chosen initial conditions:
// TO(0), the output period that starts at the first end of period t(0), and
// d(0), the delay from the last Sin edge to t(0). In every case the monitor
// checks the loop equation at each step. On top of that:
//   lock      f1/fc = 0.6, TI = 10, TO(0) = 12.4, d(0) = 1: the steps must
//             follow TO(k) = TI + (TO(0)-TI)*(f2/fc)^k and
//             d(k) = d(0) + (TO(0)-TI)/(f1/fc)*(1-(f2/fc)^k), with the published
//             values TO(1..5) = 10.96 10.38 10.15 10.06 10.02 and
//             d(1..5) = 3.4 4.36 4.74 4.89 4.95, d_inf = 5;
//   dinf      TI = 10, TO(0) = 12, d(0) = 0, f1/fc = 0.3 and 0.7: d must settle
//             at (TO(0)-TI)/(f1/fc) + d(0) (6.66 and 2.85 t.u.);
//   speed     TI = 10, TO(0) = 9, f2/fc = 0.1 and 0.8: TO(k) must follow the
//             model; d(0) = 8 t.u. so that d stays positive (see README);
//   noise     TI uniform in 5..15 t.u., f2/fc = 0.95, 0.9, 0.85: the spread of
//             the output period after the transient is reported, and for
//             f2/fc = 0.95 it must be below the input spread;
//   ramp      TI = 2 + 0.3k t.u., f1/fc = 0.9, TO(0) = TI(0) (instead of 0),
//             d(0) = 1.5: while d stays positive the output must follow the
//             ramp with the constant lag 0.3/(f1/fc) t.u.
// The cases that leave the range 0 <= d < TI (dinf with f1/fc = 0.2, speed
// with f2/fc = 0.95, ramp beyond step 5 and with f1/fc = 0.4 and 0.2) run
// as well and are only reported.
module tb_fll_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // d(0) = INIT - 1 - START; TO(0) = T(-1) + f2*d(0), where T(-1) = START + 1
  // is the time from reset to the first Sin edge
  // lock: f1/fc = 154/256, TO(0) = 124, d(0) = 10
  fll_bench #(.INIT(130), .RATIO(154), .START(119), .TI0(100))                        lock    (.clk, .rst_n);
  // dinf: TO(0) = 120, d(0) = 0
  fll_bench #(.INIT(120), .RATIO(77),  .START(119), .TI0(100))                        dinf_03 (.clk, .rst_n);
  fll_bench #(.INIT(120), .RATIO(179), .START(119), .TI0(100))                        dinf_07 (.clk, .rst_n);
  fll_bench #(.INIT(120), .RATIO(51),  .START(119), .TI0(100))                        dinf_02 (.clk, .rst_n);
  // speed: TO(0) = 90, d(0) = 80: START = 89 - f2*80, INIT = START + 81
  fll_bench #(.INIT(162), .RATIO(230), .START(81),  .TI0(100))                        speed_01 (.clk, .rst_n);
  fll_bench #(.INIT(106), .RATIO(51),  .START(25),  .TI0(100))                        speed_08 (.clk, .rst_n);
  fll_bench #(.INIT(91),  .RATIO(13),  .START(10),  .TI0(100))                        speed_095(.clk, .rst_n);
  // noise: TO(0) = 100, d(0) = 50
  fll_bench #(.INIT(103), .RATIO(13),  .START(52),  .MODE(1), .TI0(100), .NOISE(50))  noise_095(.clk, .rst_n);
  fll_bench #(.INIT(105), .RATIO(26),  .START(54),  .MODE(1), .TI0(100), .NOISE(50))  noise_09 (.clk, .rst_n);
  fll_bench #(.INIT(108), .RATIO(38),  .START(57),  .MODE(1), .TI0(100), .NOISE(50))  noise_085(.clk, .rst_n);
  // ramp: TI(k) = 20 + 3k clocks, TO(0) = 20, d(0) = 15
  fll_bench #(.INIT(35),  .RATIO(230), .START(19),  .MODE(2), .TI0(20), .SLOPE(3))    ramp_09(.clk, .rst_n);
  fll_bench #(.INIT(44),  .RATIO(102), .START(28),  .MODE(2), .TI0(20), .SLOPE(3))    ramp_04(.clk, .rst_n);
  fll_bench #(.INIT(47),  .RATIO(51),  .START(31),  .MODE(2), .TI0(20), .SLOPE(3))    ramp_02(.clk, .rst_n);

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // model step response from the run's own TO(0), d(0); hist_to[k+1] is TO(k),
  // hist_d[k] is d(k)
  task automatic follow_model(input string name, input int to_h[$], input int d_h[$], input real a1,
                              input real ti, input int steps, input real tol, input bit check_d);
    real to0, d0, b, tok, dk, worst_to, worst_d;
    to0 = real'(to_h[1]);
    d0  = real'(d_h[0]);
    b   = 1.0 - a1;
    worst_to = 0.0; worst_d = 0.0;
    for (int k = 1; k <= steps; k++) begin
      tok = ti + (to0 - ti) * (b ** k);
      dk  = d0 + (to0 - ti) / a1 * (1.0 - b ** k);
      if (absr(to_h[k+1] - tok) > worst_to) worst_to = absr(to_h[k+1] - tok);
      if (absr(d_h[k] - dk) > worst_d) worst_d = absr(d_h[k] - dk);
    end
    $display("%-8s TO(0)=%0d d(0)=%0d  TO(%0d)=%0d d(%0d)=%0d  model d_inf=%.1f  worst |TO-model|=%.2f |d-model|=%.2f clocks",
             name, to_h[1], d_h[0], steps, to_h[steps+1], steps, d_h[steps], d0 + (to0 - ti) / a1,
             worst_to, worst_d);
    check(worst_to <= tol, $sformatf("%s: TO(k) leaves the model by %.2f clocks", name, worst_to));
    if (check_d) check(worst_d <= 2.0 * tol / a1,
                       $sformatf("%s: d(k) leaves the model by %.2f clocks", name, worst_d));
  endtask

  function automatic real spread(input int q[$], input int from);
    real m, v;
    int  n;
    m = 0.0; v = 0.0; n = q.size() - from;
    for (int i = from; i < q.size(); i++) m += q[i];
    m /= n;
    for (int i = from; i < q.size(); i++) v += (q[i] - m) * (q[i] - m);
    return $sqrt(v / n);
  endfunction

  int to_h[$], d_h[$], ti_h[$];

  initial begin
    real s_in, s_095, s_09, s_085, err;
    real pub_to[5];
    real pub_d[5];
    pub_to = '{109.6, 103.8, 101.5, 100.6, 100.2};
    pub_d  = '{34.0, 43.6, 47.4, 48.9, 49.5};
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    while (noise_095.mon.n_periods < 502 || noise_09.mon.n_periods < 502 || noise_085.mon.n_periods < 502
           || dinf_03.mon.n_periods < 40)
      @(negedge clk);

    // ---- lock
    to_h = lock.mon.hist_to; d_h = lock.mon.hist_d;
    follow_model("lock", to_h, d_h, 154.0 / 256.0, 100.0, 20, 2.0, 1);
    for (int k = 1; k <= 5; k++) begin
      check(absr(to_h[k+1] - pub_to[k-1]) <= 2.0 && absr(d_h[k] - pub_d[k-1]) <= 2.0,
            $sformatf("lock: step %0d TO=%0d d=%0d, published %.1f %.1f", k, to_h[k+1], d_h[k],
                      pub_to[k-1], pub_d[k-1]));
    end
    check(d_h[20] >= 48 && d_h[20] <= 52, $sformatf("lock: d_inf %0d, published 50", d_h[20]));

    // ---- dinf
    to_h = dinf_03.mon.hist_to; d_h = dinf_03.mon.hist_d;
    follow_model("dinf 0.3", to_h, d_h, 77.0 / 256.0, 100.0, 30, 2.0, 1);
    to_h = dinf_07.mon.hist_to; d_h = dinf_07.mon.hist_d;
    follow_model("dinf 0.7", to_h, d_h, 179.0 / 256.0, 100.0, 15, 2.0, 1);
    to_h = dinf_02.mon.hist_to; d_h = dinf_02.mon.hist_d;
    $display("dinf 0.2 (reported only): TO(1..8) = %0d %0d %0d %0d %0d %0d %0d %0d, last TO %0d, last d %0d",
             to_h[2], to_h[3], to_h[4], to_h[5], to_h[6], to_h[7], to_h[8], to_h[9], to_h[to_h.size()-1],
             d_h[d_h.size()-1]);

    // ---- speed
    to_h = speed_01.mon.hist_to; d_h = speed_01.mon.hist_d;
    follow_model("speed 0.1", to_h, d_h, 230.0 / 256.0, 100.0, 15, 2.0, 1);
    to_h = speed_08.mon.hist_to; d_h = speed_08.mon.hist_d;
    follow_model("speed 0.8", to_h, d_h, 51.0 / 256.0, 100.0, 15, 2.0, 1);
    to_h = speed_095.mon.hist_to; d_h = speed_095.mon.hist_d;
    $display("speed 0.95 (reported only): TO(1..8) = %0d %0d %0d %0d %0d %0d %0d %0d, last TO %0d",
             to_h[2], to_h[3], to_h[4], to_h[5], to_h[6], to_h[7], to_h[8], to_h[9], to_h[to_h.size()-1]);

    // ---- noise
    ti_h = noise_095.ti_hist;
    s_in  = spread(ti_h, 100);
    to_h = noise_095.mon.hist_to; s_095 = spread(to_h, 100);
    to_h = noise_09.mon.hist_to;  s_09  = spread(to_h, 100);
    to_h = noise_085.mon.hist_to; s_085 = spread(to_h, 100);
    $display("noise: spread of TI %.1f clocks; of TO for f2/fc = 0.95 / 0.9 / 0.85: %.1f / %.1f / %.1f",
             s_in, s_095, s_09, s_085);
    check(s_095 < s_in, "noise: no noise rejection at f2/fc = 0.95");

    // ---- ramp
    to_h = ramp_09.mon.hist_to; ti_h = ramp_09.ti_hist;
    // TI(k), the input period that holds t(k), is ti_hist[k]. The lag of a
    // first-order loop on a ramp of SLOPE per step is SLOPE/(f1/fc); d shrinks
    // by the same amount every step, so the ramp can be followed only while
    // d(k) stays positive (five steps here).
    err = 0.0;
    for (int k = 2; k <= 5; k++)
      if (absr(ti_h[k] - to_h[k+1] - 3.0 * 256.0 / 230.0) > err)
        err = absr(ti_h[k] - to_h[k+1] - 3.0 * 256.0 / 230.0);
    $display("ramp 0.9: TI(k)-TO(k) for k=2..5: %0d %0d %0d %0d, model lag %.2f; TO(14)=%0d TI(14)=%0d",
             ti_h[2] - to_h[3], ti_h[3] - to_h[4], ti_h[4] - to_h[5], ti_h[5] - to_h[6],
             3.0 * 256.0 / 230.0, to_h[15], ti_h[14]);
    check(err <= 1.5, "ramp: ramp lag differs from the model");
    to_h = ramp_04.mon.hist_to; ti_h = ramp_04.ti_hist;
    $display("ramp 0.4 (reported only): TO(14)=%0d TI(14)=%0d", to_h[15], ti_h[14]);
    to_h = ramp_02.mon.hist_to; ti_h = ramp_02.ti_hist;
    $display("ramp 0.2 (reported only): TO(14)=%0d TI(14)=%0d", to_h[15], ti_h[14]);

    checks  += lock.mon.checks + dinf_03.mon.checks + dinf_07.mon.checks + dinf_02.mon.checks
             + speed_01.mon.checks + speed_08.mon.checks + speed_095.mon.checks + noise_095.mon.checks
             + noise_09.mon.checks + noise_085.mon.checks + ramp_09.mon.checks + ramp_04.mon.checks
             + ramp_02.mon.checks;
    failures += lock.mon.failures + dinf_03.mon.failures + dinf_07.mon.failures + dinf_02.mon.failures
             + speed_01.mon.failures + speed_08.mon.failures + speed_095.mon.failures + noise_095.mon.failures
             + noise_09.mon.failures + noise_085.mon.failures + ramp_09.mon.failures + ramp_04.mon.failures
             + ramp_02.mon.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
