// tb_rcm: self-checking test of the recursive calculation module.
//
// The test plays the role of the rest of the loop: it generates random Sin
// and Sop edges (Sop edges at least three clocks apart), drives d and T from
// them, issues P2 one clock and R two clocks after each Sop edge, and splits
// random Sc ticks at random into S1 and S2 ticks. It checks the loop
// equation in its three-interval form: at every Sop edge N_b must equal the
// S1 ticks seen while d was high during the previous output period, plus the
// Sc ticks while T was high and the S2 ticks while d was high during the
// current one (modulo 2**WIDTH). A second phase uses long periods, which
// must wrap the counters and raise ovf_o.
module tb_rcm;
  import fll_pkg::*;

  localparam int unsigned W = 8;

  logic         clk = 1'b0, rst_n, d, t, p2, r, ovf;
  ticks_t       ticks;
  logic [W-1:0] nb;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  rcm #(.WIDTH(W)) dut (.clk, .rst_n, .d_i(d), .t_i(t), .ticks_i(ticks), .p2_i(p2), .r_i(r),
                        .nb_o(nb), .ovf_o(ovf));

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  w_f1, prev_w_f1, w_2, since_sop, n_ovf, n_per, exp_nb, maxgap;
    bit  sin_ev, sop_ev, h1, h2;
    d = 0; t = 1; p2 = 0; r = 0; ticks = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    w_f1 = 0; prev_w_f1 = 0; w_2 = 0; since_sop = 10; n_ovf = 0; n_per = 0; h1 = 0; h2 = 0;
    for (int i = 0; i < 60000; i++) begin
      maxgap = (i < 40000) ? 25 : 400;
      ticks.c  = ($urandom_range(9) < 8);
      ticks.f1 = ticks.c && ($urandom_range(1) != 0);
      ticks.f2 = ticks.c && !ticks.f1;
      sin_ev = ($urandom_range(maxgap) == 0);
      sop_ev = (since_sop >= 3) && ($urandom_range(maxgap) == 0);
      p2 = h1;
      r  = h2;
      #1;
      // expected contributions of this clock
      if (d && ticks.f1) w_f1++;
      if ((d && ticks.f2) || (t && ticks.c)) w_2++;
      if (ovf) n_ovf++;
      if (sop_ev) begin
        exp_nb = (prev_w_f1 + w_2) % (1 << W);
        checks++;
        if (nb != W'(exp_nb)) begin
          failures++;
          $display("FAIL: clock %0d: N_b=%0d expected %0d", i, nb, exp_nb);
        end
        prev_w_f1 = w_f1;
        w_f1 = 0;
        w_2 = 0;
        n_per++;
        since_sop = 0;
      end else since_sop++;
      h2 = h1;
      h1 = sop_ev;
      @(posedge clk);
      #1;
      // interval flip-flops as the loop has them: a Sop edge wins
      if (sop_ev) begin
        d = 0; t = 1;
      end else if (sin_ev) begin
        d = 1; t = 0;
      end
    end
    checks++;
    if (n_per < 1000 || n_ovf == 0) begin
      failures++;
      $display("FAIL: %0d periods, %0d overflow flags", n_per, n_ovf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
