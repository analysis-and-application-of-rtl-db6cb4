// fll_monitor: testbench observer for the whole loop.
//
// It sees only what a user of the loop sees: the Sin level it drives, the
// Sop pulses, the period word and the three clock enables. From them it
// rebuilds, clock by clock, the intervals d and T the loop measures (the Sin
// edge reaches the loop SYNC clocks after the clock in which it is driven;
// Sop is a registered copy of the end of period) and checks two things at
// every end of period:
//   - the new period word equals the S1 ticks counted while d was high in
//     the previous output period plus the Sc ticks while T was high and the
//     S2 ticks while d was high in the current one (modulo 2**W, raised to
//     NMIN), i.e. fc*TO(k+1) = f1*d(k) + fc*T(k) + f2*d(k+1);
//   - the output period just ended lasted exactly the word that defined it,
//     in Sc ticks.
// It also records TO(k), d(k) and TI(k) (in Sc ticks or clocks) for the
// testbench. Sin falls must not come within SYNC clocks after reset.
module fll_monitor #(
  parameter int W    = 8,
  parameter int NMIN = 3,
  parameter int INIT = 128,
  parameter int SYNC = 2
) (
  input logic         clk,
  input logic         rst_n,
  input logic         sin_i,
  input logic         sop_o,
  input logic [W-1:0] nb_o,
  input logic         tick_c,
  input logic         tick_1,
  input logic         tick_2
);
  int checks = 0, failures = 0;
  int n_periods = 0;          // ends of output period seen
  int last_to = 0;            // length of the output period that just ended, Sc ticks
  int last_d  = 0;            // d that ended with it, clocks (-1: no Sin edge in it)
  int last_ti = 0;            // last input period, clocks
  int cur_word = INIT;        // word defining the running output period
  int hist_to[$], hist_d[$];

  bit prev_valid = 0;
  bit prev_c, prev_1, prev_2, prev_sin_lvl;
  bit fall_pipe[$];
  bit d_m, t_m;
  int w_f1, prev_w_f1, w_2, tick_cnt, d_len, clk_since_sin;
  bit sin_seen;

  always @(negedge clk) begin
    if (!rst_n) begin
      prev_valid = 0;
      d_m = 0; t_m = 1;
      w_f1 = 0; prev_w_f1 = 0; w_2 = 0; tick_cnt = 0; d_len = 0;
      cur_word = INIT;
      sin_seen = 0; clk_since_sin = 0;
      fall_pipe.delete();
      for (int i = 0; i < SYNC; i++) fall_pipe.push_back(1'b0);
      prev_sin_lvl = sin_i;
    end else begin
      bit drv_fall;
      drv_fall = prev_sin_lvl && !sin_i;
      prev_sin_lvl = sin_i;
      fall_pipe.push_back(drv_fall);
      if (prev_valid) begin
        bit sin_ev, sop_ev;
        int exp_word;
        // the clock before this one
        sin_ev = fall_pipe.pop_front();
        sop_ev = sop_o;
        if (prev_c) tick_cnt++;
        if (d_m && prev_1) w_f1++;
        if ((d_m && prev_2) || (t_m && prev_c)) w_2++;
        if (d_m) d_len++;
        clk_since_sin++;
        if (sin_ev) begin
          if (sin_seen) last_ti = clk_since_sin;
          sin_seen = 1;
          clk_since_sin = 0;
        end
        if (sop_ev) begin
          exp_word = (prev_w_f1 + w_2) % (1 << W);
          if (exp_word < NMIN) exp_word = NMIN;
          checks += 2;
          if (int'(nb_o) != exp_word) begin
            failures++;
            $display("FAIL: period %0d: word %0d, expected %0d", n_periods, nb_o, exp_word);
          end
          if (tick_cnt != cur_word) begin
            failures++;
            $display("FAIL: period %0d lasted %0d ticks, word was %0d", n_periods, tick_cnt, cur_word);
          end
          last_to = tick_cnt;
          last_d  = d_m ? d_len : (sin_ev ? 0 : -1);
          hist_to.push_back(last_to);
          hist_d.push_back(last_d);
          cur_word = exp_word;
          prev_w_f1 = w_f1;
          w_f1 = 0; w_2 = 0; tick_cnt = 0; d_len = 0;
          n_periods++;
          d_m = 0; t_m = 1;
        end else if (sin_ev) begin
          d_m = 1; t_m = 0;
        end
      end
      prev_c = tick_c; prev_1 = tick_1; prev_2 = tick_2;
      prev_valid = 1;
    end
  end
endmodule
